// tb_ser_to_par: sends random 9-bit words LSB first in 9-cycle frames and
// checks that the deserialiser presents each word at the end of its frame, holds
// it for the whole next frame and pulses `valid` exactly once per frame, in the
// cycle after the word arrived.
module tb_ser_to_par;
  import bsf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 9, NS = 300;

  logic clk = 1'b0, rst = 1'b1;
  frame_t fr;
  logic d, valid;
  logic signed [W-1:0] q;
  int checks = 0, failures = 0;

  frame_counter #(.XW(8), .W(W)) u_cnt (.clk(clk), .rst(rst), .fr(fr));
  ser_to_par #(.W(W)) u_s2p (.clk(clk), .rst(rst), .last(fr.last), .d(d), .q(q), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    longint w, prev;
    d = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // first cycle after reset is a frame end: let it pass
    @(negedge clk);
    prev = 0;
    for (int n = 0; n < NS; n++) begin
      w = rand_s(W);
      for (int k = 0; k < W; k++) begin
        d = w[k];
        #1;
        checks++;
        // valid only in the first cycle of a frame, q holds the previous word
        if (valid !== (k == 0) || (n > 0 && longint'(q) != prev)) begin
          failures++;
          $display("FAIL word %0d bit %0d: valid=%b q=%0d prev=%0d", n, k, valid, q, prev);
        end
        @(negedge clk);
      end
      prev = w;
    end
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
