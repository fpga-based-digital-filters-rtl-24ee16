// tb_serial_adder: adds pairs of random 10-bit two's-complement words, sent
// LSB first in 10-cycle frames, and compares each serial sum with (a + b)
// wrapped to 10 bits. The pairs include carries through every bit position and
// back-to-back frames, so a carry that leaked into the next frame would show.
module tb_serial_adder;
  import tb_ref_pkg::*;

  localparam int W = 10, NS = 500;

  logic clk = 1'b0, rst = 1'b1;
  logic first, a, b, s;
  int checks = 0, failures = 0;

  serial_adder u_add (.clk(clk), .rst(rst), .first(first), .a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  initial begin
    longint av, bv, got;
    first = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < NS; n++) begin
      case (n % 4)
        0: begin av = -1; bv = 1; end             // carry ripples through all bits
        1: begin av = rand_s(W); bv = -1; end
        default: begin av = rand_s(W); bv = rand_s(W); end
      endcase
      got = 0;
      for (int k = 0; k < W; k++) begin
        first = (k == 0);
        a = av[k];
        b = bv[k];
        #1 got[k] = s;
        @(negedge clk);
      end
      got = wrap(got, W);
      checks++;
      if (got != wrap(av + bv, W)) begin
        failures++;
        $display("FAIL %0d + %0d: got %0d", av, bv, got);
      end
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
