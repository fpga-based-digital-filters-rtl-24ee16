// fir_filter: complete bit-serial FIR filter with parallel sample ports.
//
// A frame_counter sequences everything in frames of W = XW + ceil(log2 NSEC)
// cycles: the 8-bit sample plus one guard bit per level of the sub-filter adder
// tree. In the last cycle of each frame (x_take high) the sample on x is taken
// into the serialiser; the cascade of fir_section sub-filters and the serial
// adder tree (fir_cascade) compute the output during the next frame and shift it
// out during the one after, where it is collected into the W-bit y. Throughput:
// one sample every W clock cycles. Latency: the clock edge that ends the x_take
// cycle of a sample is followed, 2 * W edges later, by the edge that loads its
// output into y and raises y_valid for one cycle.
//
// Samples are two's-complement fractions with 7 fractional bits; y has the same
// 7 fractional bits and ceil(log2 NSEC) more integer bits. The default is the
// eighth-order filter built from a fourth- and a third-order sub-filter (9-tap
// binomial low-pass coefficients, a choice of this design).
module fir_filter
  import bsf_pkg::*;
#(
  parameter int unsigned NSEC = 2,
  parameter sec_arr_t    SEC_ORDER = '{0: 4, 1: 3, default: 0},
  parameter coef_arr_t   COEF = '{0: 256, 1: 2048, 2: 7168, 3: 14336, 4: 17920,
                                  5: 14336, 6: 7168, 7: 2048, 8: 256, default: 0},
  parameter int unsigned XW = SAMPLE_W,
  parameter int unsigned W  = XW + $clog2(NSEC)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [XW-1:0] x,
  output logic                 x_take,
  output logic signed [W-1:0]  y,
  output logic                 y_valid
);

  frame_t fr;
  logic x_bit, y_bit;

  frame_counter #(.XW(XW), .W(W)) u_cnt (
    .clk(clk), .rst(rst), .fr(fr)
  );

  par_to_ser #(.XW(XW), .W(W)) u_p2s (
    .clk(clk), .rst(rst), .load(fr.last), .d(x), .q(x_bit)
  );

  fir_cascade #(
    .NSEC(NSEC), .SEC_ORDER(SEC_ORDER), .XW(XW), .W(W), .COEF(COEF)
  ) u_fir (
    .clk(clk), .rst(rst), .fr(fr), .x_in(x_bit), .y_out(y_bit)
  );

  ser_to_par #(.W(W)) u_s2p (
    .clk(clk), .rst(rst), .last(fr.last), .d(y_bit), .q(y), .valid(y_valid)
  );

  assign x_take = fr.last && !rst;

endmodule
