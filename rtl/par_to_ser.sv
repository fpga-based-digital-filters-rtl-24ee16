// par_to_ser: serialiser between the sample source (the ADC) and a bit-serial
// filter.
//
// In the last cycle of each frame it takes the XW-bit two's-complement sample d,
// sign-extends it to the W-bit frame and then shifts it out LSB first, one bit
// per cycle, so that bit 0 is on q in the first cycle of the next frame. This is
// the x(n) register of the filter: its output bit is the x(n) table address bit.
module par_to_ser
  import bsf_pkg::*;
#(
  parameter int unsigned XW = SAMPLE_W,
  parameter int unsigned W  = SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,   // last cycle of the frame
  input  logic signed [XW-1:0] d,
  output logic                 q
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (load) sr <= W'(d);
    else           sr <= {sr[W-1], sr[W-1:1]};
  end

  assign q = sr[0];

endmodule
