// ser_to_par: deserialiser between a bit-serial filter and the sample sink
// (the DAC).
//
// Shifts the serial output in, LSB first, and in the last cycle of each frame
// stores the complete W-bit word in the output register q, which then holds it
// for a whole frame. `valid` is high for the one cycle after q changed.
module ser_to_par #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                last,   // last cycle of the frame
  input  logic                d,
  output logic signed [W-1:0] q,
  output logic                valid
);

  logic [W-1:0] sr, nxt;   // sr[0] is shifted out unused

  assign nxt = {d, sr[W-1:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sr    <= '0;
      q     <= '0;
      valid <= 1'b0;
    end else begin
      sr    <= nxt;
      valid <= last;
      if (last) q <= nxt;
    end
  end

endmodule
