// tb_par_to_ser: loads random 8-bit samples at the end of each frame into a
// serialiser with 8-cycle frames and one with 10-cycle frames, and checks that
// the following frame carries the sample LSB first, sign-extended to the frame.
module tb_par_to_ser;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 300;

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr8, fr10;
  logic signed [7:0] d8, d10;
  logic q8, q10;
  logic [7:0] c8;
  logic [9:0] c10;
  int checks = 0, failures = 0;
  int n8 = 0, n10 = 0;
  longint xs [NS+2];

  frame_counter #(.XW(8), .W(8))  u_c8  (.clk(clk), .rst(rst), .fr(fr8));
  frame_counter #(.XW(8), .W(10)) u_c10 (.clk(clk), .rst(rst), .fr(fr10));
  par_to_ser #(.W(8))  u_a (.clk(clk), .rst(rst), .load(fr8.last),  .d(d8),  .q(q8));
  par_to_ser #(.W(10)) u_b (.clk(clk), .rst(rst), .load(fr10.last), .d(d10), .q(q10));

  always #5 clk = ~clk;

  assign d8  = 8'(xs[n8]);
  assign d10 = 8'(xs[n10]);

  always @(posedge clk) begin
    if (!rst) begin
      c8  <= {q8, c8[7:1]};
      c10 <= {q10, c10[9:1]};
      if (fr8.last) begin
        if (n8 >= 1) begin
          checks++;
          if (longint'($signed({q8, c8[7:1]})) != xs[n8-1]) begin
            failures++;
            $display("FAIL w8 sample %0d", n8 - 1);
          end
        end
        n8 <= n8 + 1;
      end
      if (fr10.last) begin
        if (n10 >= 1) begin
          checks++;
          if (longint'($signed({q10, c10[9:1]})) != xs[n10-1]) begin
            failures++;
            $display("FAIL w10 sample %0d", n10 - 1);
          end
        end
        n10 <= n10 + 1;
      end
    end
  end

  initial begin
    for (int n = 0; n < NS + 2; n++) xs[n] = rand_s(8);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (n10 == NS);
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
