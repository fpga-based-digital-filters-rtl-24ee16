// tb_frame_counter: checks the frame strobes of two counters, an 8-cycle frame
// for 8-bit samples and a 10-cycle frame with two guard cycles. After reset the
// first cycle is the last cycle of a frame; then every strobe must repeat with
// the frame period and sit at its bit position.
module tb_frame_counter;
  import bsf_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr8, fr10;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(8))  u_8  (.clk(clk), .rst(rst), .fr(fr8));
  frame_counter #(.XW(8), .W(10)) u_10 (.clk(clk), .rst(rst), .fr(fr10));

  always #5 clk = ~clk;

  task automatic expect_fr(input frame_t got, input int ph, input int xw, input int w);
    frame_t exp;
    exp.first     = (ph == 0);
    exp.value_bit = (ph < xw - 1);
    exp.sign_bit  = (ph == xw - 1);
    exp.last      = (ph == w - 1);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL w=%0d phase %0d: got %b expected %b", w, ph, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // right after reset: last cycle of a frame
    expect_fr(fr8, 7, 8, 8);
    expect_fr(fr10, 9, 8, 10);
    for (int c = 0; c < 200; c++) begin
      @(posedge clk); #1;
      expect_fr(fr8, c % 8, 8, 8);
      expect_fr(fr10, c % 10, 8, 10);
    end
    // reset in the middle of a frame restarts at the frame end
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    expect_fr(fr8, 7, 8, 8);
    expect_fr(fr10, 9, 8, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
