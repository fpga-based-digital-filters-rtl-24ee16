// frame_counter: bit-phase controller of a bit-serial filter.
//
// Counts the W cycles of one serial word and decodes the strobes every other
// block of the filter runs on (bsf_pkg::frame_t): the first (LSB) cycle, the
// value-bit cycles in which the accumulator adds, the sign-bit cycle in which it
// subtracts, and the last cycle of the frame in which results are stored and a
// new sample is loaded. The sample has XW bits; W may be larger than XW when a
// FIR tree adds guard bits, and the extra cycles carry only sign extension.
//
// Reset puts the counter on the last cycle of a frame, so the first clock edge
// after reset loads the first sample, as the ring counter of the original
// filter code does. That ring counter is one-hot; this one is binary (own
// choice, same timing).
module frame_counter
  import bsf_pkg::*;
#(
  parameter int unsigned XW = SAMPLE_W,  // sample bits (l+1)
  parameter int unsigned W  = SAMPLE_W   // cycles per frame, W >= XW
) (
  input  logic   clk,
  input  logic   rst,     // synchronous, active high
  output frame_t fr
);

  if (W < XW || XW < 2) begin : g_bad
    $error("frame_counter: need W >= XW >= 2");
  end

  localparam int unsigned PW = $clog2(W+1);

  logic [PW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst)                     phase <= PW'(W - 1);
    else if (phase == PW'(W - 1)) phase <= '0;
    else                         phase <= phase + 1'b1;
  end

  always_comb begin
    fr.first     = (phase == '0);
    fr.value_bit = (phase <  PW'(XW - 1));
    fr.sign_bit  = (phase == PW'(XW - 1));
    fr.last      = (phase == PW'(W - 1));
  end

endmodule
