// tb_fir100: a hundredth-order FIR filter (101 taps) built as 21 sub-filters
// (17 of order 4 and 4 of order 3, i.e. 17 tables of 32 entries and 4 of 16)
// summed by a five-level serial adder tree, so the serial words are
// 8 + 5 = 13 bits long and one output leaves every 13 cycles. The coefficients
// are a parabolic (Welch) window, c(k) = floor(2^16 (k+1)(101-k) / 176851),
// which sums to about 1. Random samples are driven through the parallel ports
// and each output is compared with the integer model of the sub-filter split;
// the spacing of x_take (13 cycles) and the latency (2 frames) are checked.
module tb_fir100;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 300, NT = 101, NSEC = 21, W = 13;

  function automatic coef_arr_t welch();
    coef_arr_t c;
    c = '{default: 0};
    for (int k = 0; k < NT; k++) c[k] = int'((longint'(65536) * (k + 1) * (NT - k)) / 176851);
    return c;
  endfunction

  function automatic sec_arr_t split();
    sec_arr_t s;
    s = '{default: 0};
    for (int i = 0; i < NSEC; i++) s[i] = (i < 17) ? 4 : 3;
    return s;
  endfunction

  localparam coef_arr_t C = welch();
  localparam sec_arr_t  S = split();

  logic clk = 1'b0, rst = 1'b1;
  logic signed [7:0] x;
  logic take, valid;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  fir_filter #(.NSEC(NSEC), .SEC_ORDER(S), .COEF(C)) u_fir (
    .clk(clk), .rst(rst), .x(x), .x_take(take), .y(y), .y_valid(valid));

  always #5 clk = ~clk;

  longint xs [NS];
  longint ex [NS];
  longint take_cyc [NS];
  longint cyc = 0;
  int nt = 0, nm = 0;

  initial begin
    vec_t c, v;
    longint tot;
    int k;
    for (int n = 0; n < NS; n++) xs[n] = (n < 150) ? rand_s(8) : ((n / 30) % 2 != 0 ? 127 : -128);
    for (int n = 0; n < NS; n++) begin
      tot = 0; k = 0;
      for (int s = 0; s < NSEC; s++) begin
        c = '{default: 0};
        v = '{default: 0};
        for (int i = 0; i <= S[s]; i++) begin
          c[i] = C[k + i];
          v[i] = (n - k - i >= 0) ? xs[n-k-i] : 0;
        end
        tot += wrap(da_eval(c, v, S[s] + 1, 8), W);
        k += S[s] + 1;
      end
      ex[n] = wrap(tot, W);
    end
  end

  assign x = (nt < NS) ? 8'(xs[nt]) : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (take && nt < NS) begin
        take_cyc[nt] = cyc;
        if (nt > 0 && cyc - take_cyc[nt-1] != longint'(W)) begin
          failures++;
          $display("FAIL x_take spacing");
        end
        nt <= nt + 1;
      end
      if (valid) begin
        int m;
        m = 0;
        while (m < nt && take_cyc[m] != cyc - longint'(2 * W + 1)) m++;
        if (m < nt) begin
          checks++;
          nm <= nm + 1;
          if (longint'(y) != ex[m]) begin
            failures++;
            $display("FAIL sample %0d: got %0d expected %0d", m, y, ex[m]);
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (nm == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * W) @(posedge clk);
    failures++;
    $display("watchdog expired (%0d outputs matched)", nm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
