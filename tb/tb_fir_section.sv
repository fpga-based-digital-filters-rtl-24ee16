// tb_fir_section: feeds random samples bit-serially into two FIR sections: the
// default fourth-order one (8-cycle frames) and a third-order one that takes
// coefficients 2..5 of a longer list and runs in 10-cycle frames, so its output
// carries two guard bits. Output words are compared with an integer model of
// the bit-by-bit distributed arithmetic (within 3 LSB of the exact sum), and the
// pass-through output x_out with the input delayed by P+1 frames. The result
// for the sample loaded at frame end m must be complete at frame end m + 2.
module tb_fir_section;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 400;
  localparam coef_arr_t CL = '{0: 999, 1: 999, 2: 60000, 3: -70000, 4: 65535,
                               5: -30000, default: 0};

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr8, fr10;
  logic [7:0] xa;
  logic [9:0] xb;
  logic ya, yb, xoa, xob;
  logic [7:0] capa, capxa;
  logic [9:0] capb, capxb;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(8))  u_c8  (.clk(clk), .rst(rst), .fr(fr8));
  frame_counter #(.XW(8), .W(10)) u_c10 (.clk(clk), .rst(rst), .fr(fr10));
  fir_section u_a (.clk(clk), .rst(rst), .fr(fr8), .x_in(xa[0]), .y_out(ya), .x_out(xoa));
  fir_section #(.P(3), .W(10), .OFS(2), .COEF(CL)) u_b (
    .clk(clk), .rst(rst), .fr(fr10), .x_in(xb[0]), .y_out(yb), .x_out(xob));

  always #5 clk = ~clk;

  longint xs [NS];
  longint ea [NS], eb [NS];
  int na = 0, nb = 0;

  function automatic longint hist(input int n);
    return (n >= 0) ? xs[n] : 0;
  endfunction

  initial begin
    vec_t c, v;
    for (int n = 0; n < NS; n++) xs[n] = rand_s(8);
    for (int n = 0; n < NS; n++) begin
      c = '{default: 0};
      c[0] = 4096; c[1] = 16384; c[2] = 24576; c[3] = 16384; c[4] = 4096;
      v = '{default: 0};
      for (int i = 0; i < 5; i++) v[i] = hist(n - i);
      ea[n] = da_eval(c, v, 5, 8);
      if ((real'(ea[n]) - exact(c, v, 5)) > 3.0 || (exact(c, v, 5) - real'(ea[n])) > 3.0) begin
        failures++;
        $display("FAIL model bound n=%0d", n);
      end
      ea[n] = wrap(ea[n], 8);
      c = '{default: 0};
      c[0] = 60000; c[1] = -70000; c[2] = 65535; c[3] = -30000;
      v = '{default: 0};
      for (int i = 0; i < 4; i++) v[i] = hist(n - i);
      eb[n] = wrap(da_eval(c, v, 4, 8), 10);
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      xa <= '0;
      xb <= '0;
    end else begin
      capa  <= {ya, capa[7:1]};
      capxa <= {xoa, capxa[7:1]};
      capb  <= {yb, capb[9:1]};
      capxb <= {xob, capxb[9:1]};
      if (fr8.last) begin
        xa <= (na < NS) ? 8'(xs[na]) : '0;
        if (na >= 2 && na - 2 < NS) begin
          checks++;
          if (longint'($signed({ya, capa[7:1]})) != ea[na-2]) begin
            failures++;
            $display("FAIL P=4 sample %0d: got %0d expected %0d", na - 2,
                     $signed({ya, capa[7:1]}), ea[na-2]);
          end
        end
        if (na >= 6 && na - 6 < NS) begin
          checks++;
          if (longint'($signed({xoa, capxa[7:1]})) != xs[na-6]) begin
            failures++;
            $display("FAIL P=4 x_out %0d", na - 6);
          end
        end
        na <= na + 1;
      end else begin
        xa <= {1'b0, xa[7:1]};
      end
      if (fr10.last) begin
        xb <= (nb < NS) ? 10'(xs[nb]) : '0;
        if (nb >= 2 && nb - 2 < NS) begin
          checks++;
          if (longint'($signed({yb, capb[9:1]})) != eb[nb-2]) begin
            failures++;
            $display("FAIL P=3 W=10 sample %0d: got %0d expected %0d", nb - 2,
                     $signed({yb, capb[9:1]}), eb[nb-2]);
          end
        end
        if (nb >= 5 && nb - 5 < NS) begin
          checks++;
          if (longint'($signed({xob, capxb[9:1]})) != xs[nb-5]) begin
            failures++;
            $display("FAIL P=3 x_out %0d", nb - 5);
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
