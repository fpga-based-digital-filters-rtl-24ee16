// tb_iir_filter: drives random 8-bit samples through the parallel ports of two
// complete IIR filters, the default single-section 50/60 Hz notch and a
// two-section (fourth-order) filter, taking a new sample whenever x_take is high.
// Every y_valid pulse is matched to the sample taken (NSEC + 1) * 8 clock edges
// before the edge that raised it, and y is compared with the integer model of
// the section chain. The spacing of x_take pulses must be 8 cycles.
module tb_iir_filter;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, NS = 300;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [7:0] xa, xb;
  logic ta, tb, va, vb;
  logic signed [7:0] ya, yb;
  int checks = 0, failures = 0;

  iir_filter u_a (.clk(clk), .rst(rst), .x(xa), .x_take(ta), .y(ya), .y_valid(va));
  iir_filter #(
    .NSEC(2),
    .A('{0: 65536, 1: -124656, 2: 65536, 3: 65536, 4: -126464, 5: 65536, default: 0}),
    .B('{1: 121392, 2: -62150, 4: 123392, 5: -62150, default: 0})
  ) u_b (.clk(clk), .rst(rst), .x(xb), .x_take(tb), .y(yb), .y_valid(vb));

  always #5 clk = ~clk;

  longint xs [NS];
  longint e1 [NS], e2 [NS];
  longint cyc = 0;
  longint take_a [NS], take_b [NS];
  int na = 0, nb = 0, ca = 0, cb = 0;

  task automatic section(inout longint s [NS], input longint a [3], input longint b [3]);
    longint o [NS];
    vec_t c, v;
    c = '{default: 0};
    c[0] = a[0]; c[1] = a[1]; c[2] = a[2]; c[3] = b[1]; c[4] = b[2];
    for (int n = 0; n < NS; n++) begin
      v = '{default: 0};
      for (int i = 0; i <= 2; i++) v[i] = (n - i >= 0) ? s[n-i] : 0;
      for (int i = 1; i <= 2; i++) v[2 + i] = (n - i >= 0) ? o[n-i] : 0;
      o[n] = wrap(da_eval(c, v, 5, 8), W);
    end
    s = o;
  endtask

  initial begin
    for (int n = 0; n < NS; n++) xs[n] = rand_s(8);
    e1 = xs;
    section(e1, '{65536, -124656, 65536}, '{0, 121392, -62150});
    e2 = e1;
    section(e2, '{65536, -126464, 65536}, '{0, 123392, -62150});
  end

  assign xa = (na < NS) ? 8'(xs[na]) : '0;
  assign xb = (nb < NS) ? 8'(xs[nb]) : '0;

  // match an output to its sample by the latency
  task automatic match(input longint t, input longint lat, input longint take [NS],
                       input int n, input longint got, input longint exp [NS],
                       inout int cnt, input string tag);
    int m;
    m = 0;
    while (m < n && take[m] != t - lat) m++;
    if (m < n) begin
      checks++;
      cnt++;
      if (got != exp[m]) begin
        failures++;
        $display("FAIL %s sample %0d: got %0d expected %0d", tag, m, got, exp[m]);
      end
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (ta && na < NS) begin
        take_a[na] = cyc;
        if (na > 0 && cyc - take_a[na-1] != longint'(W)) begin
          failures++;
          $display("FAIL x_take spacing");
        end
        na <= na + 1;
      end
      if (tb && nb < NS) begin
        take_b[nb] = cyc;
        nb <= nb + 1;
      end
      if (va) match(cyc, 2 * W + 1, take_a, na, longint'(ya), e1, ca, "one section");
      if (vb) match(cyc, 3 * W + 1, take_b, nb, longint'(yb), e2, cb, "two sections");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (cb == NS);
    checks++;
    if (ca != NS) begin
      failures++;
      $display("FAIL only %0d outputs of the single section matched", ca);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * W) @(posedge clk);
    failures++;
    $display("watchdog expired (%0d/%0d outputs matched)", ca, cb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
