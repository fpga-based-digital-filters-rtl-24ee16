// da_accumulator: adder-subtractor and S register of a distributed-arithmetic
// filter.
//
// The table output f arrives once per bit of the samples, least significant bit
// first. On value bits the register takes S/2 + f; on the sign bit it takes
// S/2 - f, which leaves the filter output sum(2^j f(j)) - f(0) in S. The halving
// is an arithmetic right shift, so the least significant bit of S is dropped at
// every step, as in the original VHDL notch filter. The finished value is held until
// the last cycle of the frame, where it is offered on `result` and S returns to
// zero for the next sample.
//
// Timing: `result` is combinational and valid from the sign-bit cycle to the
// last cycle of the frame. The `first` strobe of fr is not needed here: S is
// already zero when a frame starts.
// The register is ACC_W = TW + 1 bits (one guard bit more than the table, own
// choice: the running value can reach twice the largest table entry).
module da_accumulator
  import bsf_pkg::*;
#(
  parameter int unsigned TW    = 11,       // table entry width
  parameter int unsigned ACC_W = TW + 1    // S register width
) (
  input  logic                    clk,
  input  logic                    rst,
  input  frame_t                  fr,
  input  logic signed [TW-1:0]    f,
  output logic signed [ACC_W-1:0] result
);

  logic signed [ACC_W-1:0] s_q, sum;
  logic signed [ACC_W-1:0] f_ext;

  assign f_ext  = ACC_W'(f);
  assign sum    = fr.sign_bit ? (s_q >>> 1) - f_ext : (s_q >>> 1) + f_ext;
  assign result = fr.sign_bit ? sum : s_q;

  always_ff @(posedge clk) begin
    if (rst || fr.last)                  s_q <= '0;
    else if (fr.value_bit || fr.sign_bit) s_q <= sum;
  end

endmodule
