// tb_da_accumulator: drives random table words into two accumulators, one with
// 8-cycle frames and one with 10-cycle frames (two guard cycles), and compares
// `result` with an integer model of S = floor(S/2) + f on value bits and
// floor(S/2) - f on the sign bit: in the sign-bit cycle and, for the long frame,
// in the guard cycles that follow, where the value must be held. Also checks that
// each frame starts from zero.
module tb_da_accumulator;
  import bsf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr8, fr10;
  logic signed [10:0] f8, f10;
  logic signed [11:0] r8, r10;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(8))  u_c8  (.clk(clk), .rst(rst), .fr(fr8));
  frame_counter #(.XW(8), .W(10)) u_c10 (.clk(clk), .rst(rst), .fr(fr10));
  da_accumulator #(.TW(11)) u_a8  (.clk(clk), .rst(rst), .fr(fr8),  .f(f8),  .result(r8));
  da_accumulator #(.TW(11)) u_a10 (.clk(clk), .rst(rst), .fr(fr10), .f(f10), .result(r10));

  always #5 clk = ~clk;

  // model state and check for one accumulator
  task automatic step(input frame_t fr, input longint f, input logic signed [11:0] r,
                      inout longint s, inout longint held, input string tag);
    longint v;
    if (fr.sign_bit) begin
      v = (s >>> 1) - f;
      held = v;
      checks++;
      if (longint'(r) != v) begin
        failures++;
        $display("FAIL %s sign cycle: got %0d expected %0d", tag, r, v);
      end
    end else if (!fr.value_bit) begin
      checks++;
      if (longint'(r) != held) begin
        failures++;
        $display("FAIL %s guard cycle: got %0d expected %0d", tag, r, held);
      end
    end
    if (fr.last)           s = 0;
    else if (fr.value_bit) s = (s >>> 1) + f;
  endtask

  longint s8 = 0, s10 = 0, h8 = 0, h10 = 0;

  initial begin
    f8 = '0; f10 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      // largest magnitudes sometimes, to reach the top of the range
      f8  = ($urandom % 4 == 0) ? (($urandom % 2 != 0) ? 11'sd1023 : -11'sd1024) : 11'($urandom);
      f10 = 11'($urandom);
      #1;
      step(fr8, longint'(f8), r8, s8, h8, "w8");
      step(fr10, longint'(f10), r10, s10, h10, "w10");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
