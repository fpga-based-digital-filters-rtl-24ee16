// tb_fir_cascade: runs random samples bit-serially through two FIR cascades:
// the default eighth-order one (a fourth- and a third-order sub-filter, one
// serial adder, 9-cycle frames) and a three-branch one (three second-order
// sub-filters, 10-cycle frames, the odd branch passed up the tree unchanged).
// Each output word is compared with an integer model: each sub-filter's slice of
// the convolution by bit-by-bit distributed arithmetic, wrapped to the frame
// width, then summed and wrapped. The model stays within 3 LSB per sub-filter of
// the exact sum. The result of the sample loaded at frame end m must be complete
// at frame end m + 2, one result per frame.
module tb_fir_cascade;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 400;
  localparam coef_arr_t C3 = '{0: 30000, 1: -20000, 2: 45000, 3: -65000, 4: 10000,
                               5: 55000, 6: -40000, 7: 35000, 8: 20000, default: 0};
  localparam coef_arr_t C8 = '{0: 256, 1: 2048, 2: 7168, 3: 14336, 4: 17920,
                               5: 14336, 6: 7168, 7: 2048, 8: 256, default: 0};

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr9, fr10;
  logic [8:0] xa, capa;
  logic [9:0] xb, capb;
  logic ya, yb;
  int checks = 0, failures = 0;
  int na = 0, nb = 0;

  frame_counter #(.XW(8), .W(9))  u_c9  (.clk(clk), .rst(rst), .fr(fr9));
  frame_counter #(.XW(8), .W(10)) u_c10 (.clk(clk), .rst(rst), .fr(fr10));
  fir_cascade u_fir8 (.clk(clk), .rst(rst), .fr(fr9), .x_in(xa[0]), .y_out(ya));
  fir_cascade #(.NSEC(3), .SEC_ORDER('{default: 2}), .COEF(C3)) u_fir3 (
    .clk(clk), .rst(rst), .fr(fr10), .x_in(xb[0]), .y_out(yb));

  always #5 clk = ~clk;

  longint xs [NS];
  longint ea [NS], eb [NS];

  // FIR made of sub-filters with the given tap counts, frame width w.
  function automatic longint fir_model(input int n, input int nsec, input int taps [4],
                                       input longint cf [9], input int w, output real ex);
    longint tot;
    vec_t c, v;
    int k;
    tot = 0; k = 0; ex = 0.0;
    for (int s = 0; s < nsec; s++) begin
      c = '{default: 0};
      v = '{default: 0};
      for (int i = 0; i < taps[s]; i++) begin
        c[i] = cf[k + i];
        v[i] = (n - k - i >= 0) ? xs[n-k-i] : 0;
      end
      tot += wrap(da_eval(c, v, taps[s], 8), w);
      ex += exact(c, v, taps[s]);
      k += taps[s];
    end
    return wrap(tot, w);
  endfunction

  initial begin
    real ex;
    for (int n = 0; n < NS; n++) xs[n] = rand_s(8);
    for (int n = 0; n < NS; n++) begin
      ea[n] = fir_model(n, 2, '{5, 4, 0, 0},
                        '{256, 2048, 7168, 14336, 17920, 14336, 7168, 2048, 256}, 9, ex);
      if (real'(ea[n]) - ex > 6.0 || ex - real'(ea[n]) > 6.0) begin
        failures++;
        $display("FAIL model bound n=%0d", n);
      end
      eb[n] = fir_model(n, 3, '{3, 3, 3, 0},
                        '{30000, -20000, 45000, -65000, 10000, 55000, -40000, 35000, 20000},
                        10, ex);
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      xa <= '0;
      xb <= '0;
    end else begin
      capa <= {ya, capa[8:1]};
      capb <= {yb, capb[9:1]};
      if (fr9.last) begin
        xa <= (na < NS) ? 9'(xs[na]) : '0;
        if (na >= 2 && na - 2 < NS) begin
          checks++;
          if (longint'($signed({ya, capa[8:1]})) != ea[na-2]) begin
            failures++;
            $display("FAIL order-8 sample %0d: got %0d expected %0d", na - 2,
                     $signed({ya, capa[8:1]}), ea[na-2]);
          end
        end
        na <= na + 1;
      end else begin
        xa <= {xa[8], xa[8:1]};
      end
      if (fr10.last) begin
        xb <= (nb < NS) ? 10'(xs[nb]) : '0;
        if (nb >= 2 && nb - 2 < NS) begin
          checks++;
          if (longint'($signed({yb, capb[9:1]})) != eb[nb-2]) begin
            failures++;
            $display("FAIL three-branch sample %0d: got %0d expected %0d", nb - 2,
                     $signed({yb, capb[9:1]}), eb[nb-2]);
          end
        end
        nb <= nb + 1;
      end else begin
        xb <= {xb[9], xb[9:1]};
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (nb == NS + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 10) * 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
