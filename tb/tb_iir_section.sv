// tb_iir_section: feeds random 8-bit samples, bit-serially and LSB first, into
// two IIR sections, the 50/60 Hz notch (order 2) and a first-order section, and
// collects their serial outputs. Each output word is compared with an integer
// model of the recursion y(n) = sum a(i) x(n-i) + sum b(i) y(n-i), evaluated bit
// by bit as the table/accumulator pair does and wrapped to 8 bits; the model is
// also held within 3 LSB of the exact product sum. The output for the sample
// loaded at frame end m must appear in the word completed at frame end m + 2.
module tb_iir_section;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, NS = 400;
  localparam coef_arr_t A1 = '{0: 32768, 1: -16384, default: 0};
  localparam coef_arr_t B1 = '{1: 49152, default: 0};

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr;
  logic [W-1:0] xsr;
  logic y2, y1;
  logic [W-1:0] cap2, cap1;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(W)) u_cnt (.clk(clk), .rst(rst), .fr(fr));
  iir_section u_notch (.clk(clk), .rst(rst), .fr(fr), .x_in(xsr[0]), .y_out(y2));
  iir_section #(.P(1), .A(A1), .B(B1)) u_first (
    .clk(clk), .rst(rst), .fr(fr), .x_in(xsr[0]), .y_out(y1));

  always #5 clk = ~clk;

  longint xs [NS];
  longint e2 [NS], e1 [NS];
  int nload = 0, ncap = 0;

  initial begin
    vec_t c, v;
    for (int n = 0; n < NS; n++) xs[n] = (n % 50 < 3) ? 0 : rand_s(8);
    // notch: coefficients a0 a1 a2 b1 b2
    c = '{default: 0};
    c[0] = 65536; c[1] = -124656; c[2] = 65536; c[3] = 121392; c[4] = -62150;
    for (int n = 0; n < NS; n++) begin
      v = '{default: 0};
      v[0] = xs[n];
      v[1] = (n >= 1) ? xs[n-1] : 0;
      v[2] = (n >= 2) ? xs[n-2] : 0;
      v[3] = (n >= 1) ? e2[n-1] : 0;
      v[4] = (n >= 2) ? e2[n-2] : 0;
      e2[n] = da_eval(c, v, 5, 8);
      if ((real'(e2[n]) - exact(c, v, 5)) > 3.0 || (exact(c, v, 5) - real'(e2[n])) > 3.0) begin
        failures++;
        $display("FAIL model bound n=%0d", n);
      end
      e2[n] = wrap(e2[n], W);
    end
    c = '{default: 0};
    c[0] = 32768; c[1] = -16384; c[2] = 49152;
    for (int n = 0; n < NS; n++) begin
      v = '{default: 0};
      v[0] = xs[n];
      v[1] = (n >= 1) ? xs[n-1] : 0;
      v[2] = (n >= 1) ? e1[n-1] : 0;
      e1[n] = wrap(da_eval(c, v, 3, 8), W);
    end
  end

  // serial source and sink
  always @(posedge clk) begin
    if (rst) begin
      xsr <= '0;
    end else begin
      cap2 <= {y2, cap2[W-1:1]};
      cap1 <= {y1, cap1[W-1:1]};
      if (fr.last) begin
        xsr <= (nload < NS) ? W'(xs[nload]) : '0;
        nload <= nload + 1;
        if (ncap >= 2 && ncap - 2 < NS) begin
          checks += 2;
          if (longint'($signed({y2, cap2[W-1:1]})) != e2[ncap-2]) begin
            failures++;
            $display("FAIL notch sample %0d: got %0d expected %0d", ncap - 2,
                     $signed({y2, cap2[W-1:1]}), e2[ncap-2]);
          end
          if (longint'($signed({y1, cap1[W-1:1]})) != e1[ncap-2]) begin
            failures++;
            $display("FAIL first-order sample %0d: got %0d expected %0d", ncap - 2,
                     $signed({y1, cap1[W-1:1]}), e1[ncap-2]);
          end
        end
        ncap <= ncap + 1;
      end else begin
        xsr <= {1'b0, xsr[W-1:1]};
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (ncap == NS + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
