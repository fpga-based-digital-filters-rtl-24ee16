// iir_filter: complete bit-serial IIR filter with parallel sample ports.
//
// A frame_counter sequences everything in frames of W = 8 cycles, one frame per
// sample. In the last cycle of each frame (x_take high) the 8-bit sample on x is
// taken into the serialiser; it is processed bit-serially by the cascade of
// iir_section sub-filters during the next frame, travels one frame per section,
// and is collected into y at the end of a frame. Throughput: one sample every W
// clock cycles. Latency: the clock edge that ends the x_take cycle of a sample
// is followed, (NSEC + 1) * W edges later, by the edge that loads its output
// into y and raises y_valid for one cycle.
//
// Samples and outputs are two's-complement fractions with 7 fractional bits.
// The default configuration is the second-order 50/60 Hz mains notch
//   y(n) = x(n) - 1.9021 x(n-1) + x(n-2) + 1.8523 y(n-1) - 0.94833 y(n-2)
// as one section, with the ports of the original VHDL filter: 8-bit x in, 8-bit y out.
module iir_filter
  import bsf_pkg::*;
#(
  parameter int unsigned NSEC = 1,
  parameter sec_arr_t    SEC_ORDER = '{default: 2},
  parameter coef_arr_t   A = '{0: 65536, 1: -124656, 2: 65536, default: 0},
  parameter coef_arr_t   B = '{1: 121392, 2: -62150, default: 0},
  parameter int unsigned XW = SAMPLE_W,
  parameter int unsigned W  = SAMPLE_W
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

  iir_cascade #(
    .NSEC(NSEC), .SEC_ORDER(SEC_ORDER), .XW(XW), .W(W), .A(A), .B(B)
  ) u_iir (
    .clk(clk), .rst(rst), .fr(fr), .x_in(x_bit), .y_out(y_bit)
  );

  ser_to_par #(.W(W)) u_s2p (
    .clk(clk), .rst(rst), .last(fr.last), .d(y_bit), .q(y), .valid(y_valid)
  );

  assign x_take = fr.last && !rst;

endmodule
