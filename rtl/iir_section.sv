// iir_section: low-order bit-serial IIR sub-filter (distributed arithmetic).
//
// Computes y(n) = a0 x(n) + ... + aP x(n-P) + b1 y(n-1) + ... + bP y(n-P)
// without multipliers. The current input sample arrives bit-serially on x_in,
// LSB first, one bit per cycle, sign bit in the XW-th cycle of the frame. The
// older samples x(n-1)..x(n-P) and outputs y(n-1)..y(n-P) sit in W-bit shift
// registers whose least significant bits, together with x_in, address a table
// of all 2^(2P+1) coefficient sums (da_lut). The table word goes to the
// adder-subtractor and S register (da_accumulator). After the sign bit, S holds
// y(n); at the end of the frame its low W bits are loaded into the y(n-1) shift
// register, and the one that held y(n-1) shifts into y(n-2) as usual.
//
// The y(n-1) register is also the serial output: during frame k+1 y_out
// carries, LSB first, the output computed from the sample that came in during
// frame k, aligned so that it can feed the x_in of the next section directly.
// The output wraps (two's complement) if it leaves the W-bit range.
//
// Table address order x(n), x(n-1)..x(n-P), y(n-1)..y(n-P), most significant
// first, and the truncating S/2 step follow the original VHDL notch filter. The new
// sample is taken straight from the serial input (its shift register belongs to
// the stage that drives x_in) rather than being copied into a register here.
module iir_section
  import bsf_pkg::*;
#(
  parameter int unsigned P   = 2,          // filter order
  parameter int unsigned XW  = SAMPLE_W,   // sample bits
  parameter int unsigned W   = SAMPLE_W,   // frame length = stored word width
  parameter int unsigned OFS = 0,          // position of a0 in A and of b0 in B
  // a coefficients a0..aP at A[OFS..OFS+P], scaled by 2^16
  parameter coef_arr_t   A = '{0: 65536, 1: -124656, 2: 65536, default: 0},
  // b coefficients b1..bP at B[OFS+1..OFS+P] (B[OFS] unused), scaled by 2^16
  parameter coef_arr_t   B = '{1: 121392, 2: -62150, default: 0}
) (
  input  logic   clk,
  input  logic   rst,
  input  frame_t fr,
  input  logic   x_in,
  output logic   y_out
);

  localparam int unsigned NA    = 2 * P + 1;
  localparam int unsigned TW    = lut_width(NA);
  localparam int unsigned ACC_W = (TW + 1 > W + 1) ? TW + 1 : W + 1;

  if (P < 1 || W < XW) begin : g_bad
    $error("iir_section: need P >= 1 and W >= XW");
  end

  // Coefficients in table-address order: a0..aP, b1..bP.
  function automatic coef_arr_t lut_coefs();
    coef_arr_t c;
    c = '{default: 0};
    for (int unsigned i = 0; i <= P; i++) c[i] = A[OFS + i];
    for (int unsigned i = 1; i <= P; i++) c[P + i] = B[OFS + i];
    return c;
  endfunction

  localparam coef_arr_t LUT_COEF = lut_coefs();

  logic [W-1:0] x_sr [P];   // x_sr[i] holds x(n-1-i)
  logic [W-1:0] y_sr [P];   // y_sr[i] holds y(n-1-i)
  logic [NA-1:0] addr;
  logic signed [TW-1:0]    f;
  logic signed [ACC_W-1:0] result;   // only the low W bits are stored

  always_comb begin
    addr[NA-1] = x_in;
    for (int unsigned i = 0; i < P; i++) begin
      addr[NA-2-i]  = x_sr[i][0];
      addr[P-1-i]   = y_sr[i][0];
    end
  end

  da_lut #(.NA(NA), .TW(TW), .COEF(LUT_COEF)) u_lut (
    .addr(addr), .f(f)
  );

  da_accumulator #(.TW(TW), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .fr(fr), .f(f), .result(result)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < P; i++) begin
        x_sr[i] <= '0;
        y_sr[i] <= '0;
      end
    end else begin
      x_sr[0] <= {x_in, x_sr[0][W-1:1]};
      for (int unsigned i = 1; i < P; i++) begin
        x_sr[i] <= {x_sr[i-1][0], x_sr[i][W-1:1]};
        y_sr[i] <= {y_sr[i-1][0], y_sr[i][W-1:1]};
      end
      if (fr.last) y_sr[0] <= result[W-1:0];
      else         y_sr[0] <= {y_sr[0][0], y_sr[0][W-1:1]};
    end
  end

  assign y_out = y_sr[0][0];

endmodule
