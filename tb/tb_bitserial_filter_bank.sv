// tb_bitserial_filter_bank: end-to-end test of the filter bank at its default
// (full) size. All five filters receive the same sample sequence, each at its
// own rate: stretches of random values, of silence (so only IIR feedback can
// make an output), of full-scale negative values and of a sine. Every output is
// matched by latency to its sample and compared with integer models built from
// the filter equations; the sample spacing (throughput) of each filter is
// checked too. The testbench also counts how often the mechanisms of the design
// occur - subtraction of a table word on the sign bit, outputs made by
// feedback alone, serial hand-over between IIR sections, the input travelling
// from one FIR sub-filter to the next, and carries inside the serial adder tree
// - and counts a failure for any that never occurs.
module tb_bitserial_filter_bank;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 400;
  localparam int NF = 5;
  // frame lengths, output widths, sections on the IIR path
  localparam int FW [NF] = '{8, 8, 8, 9, 10};
  localparam int LAT [NF] = '{2 * 8 + 1, 3 * 8 + 1, 2 * 8 + 1, 2 * 9 + 1, 2 * 10 + 1};

  logic clk = 1'b0, rst = 1'b1;
  logic signed [7:0] x [NF];
  logic take [NF], valid [NF];
  logic signed [7:0] y_iir2, y_iir4, y_fir4;
  logic signed [8:0] y_fir8;
  logic signed [9:0] y_fir18;
  int checks = 0, failures = 0;

  bitserial_filter_bank dut (
    .clk(clk), .rst(rst),
    .iir2_x(x[0]), .iir2_x_take(take[0]), .iir2_y(y_iir2), .iir2_y_valid(valid[0]),
    .iir4_x(x[1]), .iir4_x_take(take[1]), .iir4_y(y_iir4), .iir4_y_valid(valid[1]),
    .fir4_x(x[2]), .fir4_x_take(take[2]), .fir4_y(y_fir4), .fir4_y_valid(valid[2]),
    .fir8_x(x[3]), .fir8_x_take(take[3]), .fir8_y(y_fir8), .fir8_y_valid(valid[3]),
    .fir18_x(x[4]), .fir18_x_take(take[4]), .fir18_y(y_fir18), .fir18_y_valid(valid[4])
  );

  always #5 clk = ~clk;

  longint xs [NS];
  longint ex [NF][NS];
  longint take_cyc [NF][NS];
  int nt [NF] = '{default: 0};
  int nm [NF] = '{default: 0};
  longint cyc = 0;

  // mechanism counters
  int n_sign_sub = 0, n_feedback = 0, n_link = 0, n_xpass = 0, n_carry = 0;

  task automatic iir_sec(inout longint s [NS], input longint a [3], input longint b [3]);
    longint o [NS];
    vec_t c, v;
    c = '{default: 0};
    c[0] = a[0]; c[1] = a[1]; c[2] = a[2]; c[3] = b[1]; c[4] = b[2];
    for (int n = 0; n < NS; n++) begin
      v = '{default: 0};
      for (int i = 0; i <= 2; i++) v[i] = (n - i >= 0) ? s[n-i] : 0;
      for (int i = 1; i <= 2; i++) v[2 + i] = (n - i >= 0) ? o[n-i] : 0;
      o[n] = wrap(da_eval(c, v, 5, 8), 8);
    end
    s = o;
  endtask

  function automatic longint fir_model(input int n, input int nsec, input int taps [4],
                                       input longint cf [19], input int w);
    longint tot;
    vec_t c, v;
    int k;
    tot = 0; k = 0;
    for (int s = 0; s < nsec; s++) begin
      c = '{default: 0};
      v = '{default: 0};
      for (int i = 0; i < taps[s]; i++) begin
        c[i] = cf[k + i];
        v[i] = (n - k - i >= 0) ? xs[n-k-i] : 0;
      end
      tot += wrap(da_eval(c, v, taps[s], 8), w);
      k += taps[s];
    end
    return wrap(tot, w);
  endfunction

  initial begin
    longint s [NS];
    for (int n = 0; n < NS; n++) begin
      case ((n / 40) % 4)
        0: xs[n] = rand_s(8);
        1: xs[n] = (n % 40 < 20) ? 0 : rand_s(8);
        2: xs[n] = (n % 40 < 10) ? -128 : 0;
        default: xs[n] = longint'($rtoi(100.0 * $sin(2.0 * 3.14159265 * real'(n) / 20.0)));
      endcase
    end
    s = xs;
    iir_sec(s, '{65536, -124656, 65536}, '{0, 121392, -62150});
    for (int n = 0; n < NS; n++) ex[0][n] = s[n];
    iir_sec(s, '{65536, -126464, 65536}, '{0, 123392, -62150});
    for (int n = 0; n < NS; n++) ex[1][n] = s[n];
    for (int n = 0; n < NS; n++) begin
      ex[2][n] = fir_model(n, 1, '{5, 0, 0, 0},
                           '{4096, 16384, 24576, 16384, 4096, 0, 0, 0, 0, 0,
                             0, 0, 0, 0, 0, 0, 0, 0, 0}, 8);
      ex[3][n] = fir_model(n, 2, '{5, 4, 0, 0},
                           '{256, 2048, 7168, 14336, 17920, 14336, 7168, 2048, 256,
                             0, 0, 0, 0, 0, 0, 0, 0, 0, 0}, 9);
      ex[4][n] = fir_model(n, 4, '{5, 5, 5, 4},
                           '{655, 1311, 1966, 2621, 3277, 3932, 4588, 5243, 5898, 6554,
                             5898, 5243, 4588, 3932, 3277, 2621, 1966, 1311, 655}, 10);
    end
  end

  for (genvar f = 0; f < NF; f++) begin : g_drive
    assign x[f] = (nt[f] < NS) ? 8'(xs[nt[f]]) : '0;
  end

  function automatic longint yval(input int f);
    case (f)
      0: return longint'(y_iir2);
      1: return longint'(y_iir4);
      2: return longint'(y_fir4);
      3: return longint'(y_fir8);
      default: return longint'(y_fir18);
    endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      for (int f = 0; f < NF; f++) begin
        if (take[f] && nt[f] < NS) begin
          take_cyc[f][nt[f]] = cyc;
          if (nt[f] > 0 && cyc - take_cyc[f][nt[f]-1] != longint'(FW[f])) begin
            failures++;
            $display("FAIL filter %0d sample spacing", f);
          end
          nt[f] <= nt[f] + 1;
        end
        if (valid[f]) begin
          int m;
          m = 0;
          while (m < nt[f] && take_cyc[f][m] != cyc - longint'(LAT[f])) m++;
          if (m < nt[f]) begin
            checks++;
            nm[f] <= nm[f] + 1;
            if (yval(f) != ex[f][m]) begin
              failures++;
              $display("FAIL filter %0d sample %0d: got %0d expected %0d", f, m, yval(f),
                       ex[f][m]);
            end
            if (f == 0 && m >= 2 && xs[m] == 0 && xs[m-1] == 0 && xs[m-2] == 0 &&
                yval(f) != 0)
              n_feedback++;
          end
        end
      end
      // mechanism probes
      if (dut.u_iir2.fr.sign_bit && dut.u_iir2.u_iir.g_sec[0].u_sec.f != 0) n_sign_sub++;
      if (dut.u_iir4.u_iir.link[1]) n_link++;
      if (dut.u_fir18.u_fir.xlink[3]) n_xpass++;
      if (dut.u_fir18.u_fir.g_lvl[1].g_out[0].g_add.u_add.carry_q) n_carry++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (nm[4] == NS);
    repeat (40) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (nm[f] != NS) begin
        failures++;
        $display("FAIL filter %0d: %0d of %0d outputs matched", f, nm[f], NS);
      end
    end
    $display("mechanisms: sign-bit subtractions %0d, feedback-only outputs %0d, section link ones %0d, sub-filter hand-over ones %0d, tree carries %0d",
             n_sign_sub, n_feedback, n_link, n_xpass, n_carry);
    checks += 5;
    if (n_sign_sub == 0) begin failures++; $display("FAIL no sign-bit subtraction"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no feedback-only output"); end
    if (n_link == 0)     begin failures++; $display("FAIL no data between sections"); end
    if (n_xpass == 0)    begin failures++; $display("FAIL no data between sub-filters"); end
    if (n_carry == 0)    begin failures++; $display("FAIL no tree carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 20) * 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
