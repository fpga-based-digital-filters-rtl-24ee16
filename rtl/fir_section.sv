// fir_section: low-order bit-serial FIR sub-filter (distributed arithmetic).
//
// Computes y(n) = c0 x(n) + c1 x(n-1) + ... + cP x(n-P). The input arrives
// bit-serially on x_in, LSB first, with the sample's sign bit in the XW-th
// cycle of a W-cycle frame (W > XW when the filter is one branch of a FIR adder
// tree; the extra cycles then carry the sign extension). x_in and the least
// significant bits of the P delayed-sample shift registers address a table of
// all 2^(P+1) coefficient sums (da_lut); the adder-subtractor and S register
// (da_accumulator) form the output over the sample's XW bits. With no feedback,
// the output is stored only in the y register at the end of the frame, all W
// bits of it, and shifted out LSB first on y_out during the next frame.
//
// One more W-bit register behind the oldest tap passes the input on, delayed by
// P+1 frames, on x_out: the next sub-filter of a cascade takes it as its x_in,
// so the sub-filters of a cascade share one long delay line.
module fir_section
  import bsf_pkg::*;
#(
  parameter int unsigned P   = 4,          // filter order (P+1 coefficients)
  parameter int unsigned XW  = SAMPLE_W,   // sample bits
  parameter int unsigned W   = SAMPLE_W,   // frame length = output width
  parameter int unsigned OFS = 0,          // position of c0 in COEF
  parameter coef_arr_t   COEF = '{0: 4096, 1: 16384, 2: 24576, 3: 16384,
                                  4: 4096, default: 0}
) (
  input  logic   clk,
  input  logic   rst,
  input  frame_t fr,
  input  logic   x_in,
  output logic   y_out,
  output logic   x_out
);

  localparam int unsigned NA    = P + 1;
  localparam int unsigned TW    = lut_width(NA);
  localparam int unsigned ACC_W = (TW + 1 > W + 1) ? TW + 1 : W + 1;

  if (W < XW) begin : g_bad
    $error("fir_section: need W >= XW");
  end

  logic [W-1:0] x_sr [P+1];   // x_sr[i] holds x(n-1-i); x_sr[P] feeds x_out
  logic [W-1:0] y_q;
  logic [NA-1:0] addr;
  logic signed [TW-1:0]    f;
  logic signed [ACC_W-1:0] result;   // only the low W bits are stored

  always_comb begin
    addr[NA-1] = x_in;
    for (int unsigned i = 0; i < P; i++) addr[NA-2-i] = x_sr[i][0];
  end

  da_lut #(.NA(NA), .TW(TW), .OFS(OFS), .COEF(COEF)) u_lut (
    .addr(addr), .f(f)
  );

  da_accumulator #(.TW(TW), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .fr(fr), .f(f), .result(result)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i <= P; i++) x_sr[i] <= '0;
      y_q <= '0;
    end else begin
      x_sr[0] <= {x_in, x_sr[0][W-1:1]};
      for (int unsigned i = 1; i <= P; i++) x_sr[i] <= {x_sr[i-1][0], x_sr[i][W-1:1]};
      if (fr.last) y_q <= result[W-1:0];
      else         y_q <= {y_q[0], y_q[W-1:1]};
    end
  end

  assign y_out = y_q[0];
  assign x_out = x_sr[P][0];

endmodule
