// serial_adder: bit-serial two's-complement adder.
//
// Adds two words that arrive LSB first, one bit per cycle: a full adder whose
// carry is kept in a flip-flop between bits. The carry is ignored in the first
// cycle of each frame, so every frame starts a new addition, and the carry out
// of the last bit is dropped (the sum wraps at the frame width). The sum bit is
// combinational, so a tree of these adders keeps the frame alignment of its
// inputs with no added latency.
module serial_adder (
  input  logic clk,
  input  logic rst,
  input  logic first,  // LSB cycle of a frame
  input  logic a,
  input  logic b,
  output logic s
);

  logic carry_q, cin;

  assign cin = first ? 1'b0 : carry_q;
  assign s   = a ^ b ^ cin;

  always_ff @(posedge clk) begin
    if (rst) carry_q <= 1'b0;
    else     carry_q <= (a & b) | (a & cin) | (b & cin);
  end

endmodule
