// tb_iir_cascade: runs random samples bit-serially through two IIR cascades:
// the default fourth-order one (60 Hz notch then 50 Hz notch, two second-order
// sections) and the fifth-order arrangement of two second-order and one
// first-order section with coefficients chosen here. Output words are compared
// with integer models of each section (bit-by-bit distributed arithmetic,
// outputs wrapped to 8 bits) chained in series. The result of the sample
// loaded at frame end m must be complete at frame end m + NSEC + 1.
module tb_iir_cascade;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, NS = 400;
  localparam coef_arr_t A5 = '{0: 20000, 1: 30000, 2: -10000,
                               3: 50000, 4: -40000, 5: 30000,
                               6: 60000, 7: 25000, default: 0};
  localparam coef_arr_t B5 = '{1: 40000, 2: -30000, 4: -20000, 5: 10000,
                               7: 30000, default: 0};

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr;
  logic [W-1:0] xsr, cap4, cap5;
  logic y4, y5;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(W)) u_cnt (.clk(clk), .rst(rst), .fr(fr));
  iir_cascade u_iir4 (.clk(clk), .rst(rst), .fr(fr), .x_in(xsr[0]), .y_out(y4));
  iir_cascade #(.NSEC(3), .SEC_ORDER('{0: 2, 1: 2, 2: 1, default: 0}), .A(A5), .B(B5)) u_iir5 (
    .clk(clk), .rst(rst), .fr(fr), .x_in(xsr[0]), .y_out(y5));

  always #5 clk = ~clk;

  longint xs [NS];
  longint e4 [NS], e5 [NS];
  int nload = 0;

  // One IIR section of order p over a whole sample sequence, in place.
  task automatic section(inout longint s [NS], input int p, input longint a [3],
                         input longint b [3]);
    longint o [NS];
    vec_t c, v;
    c = '{default: 0};
    for (int i = 0; i <= p; i++) c[i] = a[i];
    for (int i = 1; i <= p; i++) c[p + i] = b[i];
    for (int n = 0; n < NS; n++) begin
      v = '{default: 0};
      for (int i = 0; i <= p; i++) v[i] = (n - i >= 0) ? s[n-i] : 0;
      for (int i = 1; i <= p; i++) v[p + i] = (n - i >= 0) ? o[n-i] : 0;
      o[n] = wrap(da_eval(c, v, 2 * p + 1, 8), W);
    end
    s = o;
  endtask

  initial begin
    for (int n = 0; n < NS; n++) xs[n] = rand_s(8);
    e4 = xs;
    section(e4, 2, '{65536, -124656, 65536}, '{0, 121392, -62150});
    section(e4, 2, '{65536, -126464, 65536}, '{0, 123392, -62150});
    e5 = xs;
    section(e5, 2, '{20000, 30000, -10000}, '{0, 40000, -30000});
    section(e5, 2, '{50000, -40000, 30000}, '{0, -20000, 10000});
    section(e5, 1, '{60000, 25000, 0}, '{0, 30000, 0});
  end

  always @(posedge clk) begin
    if (rst) begin
      xsr <= '0;
    end else begin
      cap4 <= {y4, cap4[W-1:1]};
      cap5 <= {y5, cap5[W-1:1]};
      if (fr.last) begin
        xsr <= (nload < NS) ? W'(xs[nload]) : '0;
        if (nload >= 3 && nload - 3 < NS) begin
          checks++;
          if (longint'($signed({y4, cap4[W-1:1]})) != e4[nload-3]) begin
            failures++;
            $display("FAIL order-4 sample %0d: got %0d expected %0d", nload - 3,
                     $signed({y4, cap4[W-1:1]}), e4[nload-3]);
          end
        end
        if (nload >= 4 && nload - 4 < NS) begin
          checks++;
          if (longint'($signed({y5, cap5[W-1:1]})) != e5[nload-4]) begin
            failures++;
            $display("FAIL order-5 sample %0d: got %0d expected %0d", nload - 4,
                     $signed({y5, cap5[W-1:1]}), e5[nload-4]);
          end
        end
        nload <= nload + 1;
      end else begin
        xsr <= {1'b0, xsr[W-1:1]};
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (nload == NS + 4);
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
