// tb_fir_filter: drives random 8-bit samples through the parallel ports of two
// complete FIR filters: the default eighth-order one (sub-filters of order 4
// and 3, 9-cycle frames, 9-bit output) and an eighteenth-order one (sub-filters
// of order 4, 4, 4, 3, a two-level adder tree, 10-cycle frames, 10-bit output).
// Every y_valid pulse is matched to the sample taken 2 * W clock edges before
// the edge that raised it and compared with the integer model; x_take must come
// every W cycles, which is the throughput of l + ceil(log2 k) cycles per sample.
module tb_fir_filter;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 300;
  localparam coef_arr_t C18 = '{0: 655, 1: 1311, 2: 1966, 3: 2621, 4: 3277, 5: 3932,
                                6: 4588, 7: 5243, 8: 5898, 9: 6554, 10: 5898, 11: 5243,
                                12: 4588, 13: 3932, 14: 3277, 15: 2621, 16: 1966,
                                17: 1311, 18: 655, default: 0};

  logic clk = 1'b0, rst = 1'b1;
  logic signed [7:0] xa, xb;
  logic ta, tb, va, vb;
  logic signed [8:0] ya;
  logic signed [9:0] yb;
  int checks = 0, failures = 0;

  fir_filter u_a (.clk(clk), .rst(rst), .x(xa), .x_take(ta), .y(ya), .y_valid(va));
  fir_filter #(.NSEC(4), .SEC_ORDER('{0: 4, 1: 4, 2: 4, 3: 3, default: 0}), .COEF(C18)) u_b (
    .clk(clk), .rst(rst), .x(xb), .x_take(tb), .y(yb), .y_valid(vb));

  always #5 clk = ~clk;

  longint xs [NS];
  longint ea [NS], eb [NS];
  longint cyc = 0;
  longint take_a [NS], take_b [NS];
  int na = 0, nb = 0, ca = 0, cb = 0;

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
    for (int n = 0; n < NS; n++) xs[n] = rand_s(8);
    for (int n = 0; n < NS; n++) begin
      ea[n] = fir_model(n, 2, '{5, 4, 0, 0},
                        '{256, 2048, 7168, 14336, 17920, 14336, 7168, 2048, 256,
                          0, 0, 0, 0, 0, 0, 0, 0, 0, 0}, 9);
      eb[n] = fir_model(n, 4, '{5, 5, 5, 4},
                        '{655, 1311, 1966, 2621, 3277, 3932, 4588, 5243, 5898, 6554,
                          5898, 5243, 4588, 3932, 3277, 2621, 1966, 1311, 655}, 10);
    end
  end

  assign xa = (na < NS) ? 8'(xs[na]) : '0;
  assign xb = (nb < NS) ? 8'(xs[nb]) : '0;

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
        if (na > 0 && cyc - take_a[na-1] != 64'd9) begin
          failures++;
          $display("FAIL order-8 x_take spacing");
        end
        na <= na + 1;
      end
      if (tb && nb < NS) begin
        take_b[nb] = cyc;
        if (nb > 0 && cyc - take_b[nb-1] != 64'd10) begin
          failures++;
          $display("FAIL order-18 x_take spacing");
        end
        nb <= nb + 1;
      end
      if (va) match(cyc, 2 * 9 + 1, take_a, na, longint'(ya), ea, ca, "order 8");
      if (vb) match(cyc, 2 * 10 + 1, take_b, nb, longint'(yb), eb, cb, "order 18");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (cb == NS);
    checks++;
    if (ca != NS) begin
      failures++;
      $display("FAIL only %0d order-8 outputs matched", ca);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * 10) @(posedge clk);
    failures++;
    $display("watchdog expired (%0d/%0d outputs matched)", ca, cb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
