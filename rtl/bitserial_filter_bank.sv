// bitserial_filter_bank: the five bit-serial filters of the evaluation, side by
// side, each with its own sample ports (8-bit input from an ADC, output to a DAC).
//
//   iir2  second-order IIR: the 50/60 Hz mains notch for electrocardiograms,
//         y(n) = x(n) - 1.9021 x(n-1) + x(n-2) + 1.8523 y(n-1) - 0.94833 y(n-2)
//         (one section, one 32-entry table; 8-cycle frames)
//   iir4  fourth-order IIR: two second-order sections in series, the 60 Hz notch
//         above followed by a 50 Hz notch for the same 1200 samples/s rate
//   fir4  fourth-order FIR: one sub-filter, 5-tap binomial low-pass
//         (one 32-entry table; 8-cycle frames, 8-bit output)
//   fir8  eighth-order FIR: a fourth- and a third-order sub-filter (32- and
//         16-entry tables) and one serial adder; 9-tap binomial low-pass
//         (9-cycle frames, 9-bit output)
//   fir18 eighteenth-order FIR: sub-filters of order 4, 4, 4 and 3 and a two-
//         level serial adder tree; 19-tap triangular low-pass
//         (10-cycle frames, 10-bit output)
//
// The notch coefficients are the published ones; the 50 Hz notch,
// the FIR coefficients and the way the 18th-order filter is split are choices
// of this design. Every filter takes a sample in the cycle its x_take is high
// and presents a new output with a one-cycle y_valid pulse; see iir_filter and
// fir_filter for the timing. All share one clock and synchronous reset.
module bitserial_filter_bank
  import bsf_pkg::*;
(
  input  logic              clk,
  input  logic              rst,

  input  logic signed [7:0] iir2_x,
  output logic              iir2_x_take,
  output logic signed [7:0] iir2_y,
  output logic              iir2_y_valid,

  input  logic signed [7:0] iir4_x,
  output logic              iir4_x_take,
  output logic signed [7:0] iir4_y,
  output logic              iir4_y_valid,

  input  logic signed [7:0] fir4_x,
  output logic              fir4_x_take,
  output logic signed [7:0] fir4_y,
  output logic              fir4_y_valid,

  input  logic signed [7:0] fir8_x,
  output logic              fir8_x_take,
  output logic signed [8:0] fir8_y,
  output logic              fir8_y_valid,

  input  logic signed [7:0] fir18_x,
  output logic              fir18_x_take,
  output logic signed [9:0] fir18_y,
  output logic              fir18_y_valid
);

  iir_filter #(
    .NSEC(1), .SEC_ORDER('{default: 2}),
    .A('{0: 65536, 1: -124656, 2: 65536, default: 0}),
    .B('{1: 121392, 2: -62150, default: 0})
  ) u_iir2 (
    .clk(clk), .rst(rst), .x(iir2_x), .x_take(iir2_x_take),
    .y(iir2_y), .y_valid(iir2_y_valid)
  );

  iir_filter #(
    .NSEC(2), .SEC_ORDER('{default: 2}),
    .A('{0: 65536, 1: -124656, 2: 65536, 3: 65536, 4: -126464, 5: 65536, default: 0}),
    .B('{1: 121392, 2: -62150, 4: 123392, 5: -62150, default: 0})
  ) u_iir4 (
    .clk(clk), .rst(rst), .x(iir4_x), .x_take(iir4_x_take),
    .y(iir4_y), .y_valid(iir4_y_valid)
  );

  fir_filter #(
    .NSEC(1), .SEC_ORDER('{0: 4, default: 0}),
    .COEF('{0: 4096, 1: 16384, 2: 24576, 3: 16384, 4: 4096, default: 0})
  ) u_fir4 (
    .clk(clk), .rst(rst), .x(fir4_x), .x_take(fir4_x_take),
    .y(fir4_y), .y_valid(fir4_y_valid)
  );

  fir_filter #(
    .NSEC(2), .SEC_ORDER('{0: 4, 1: 3, default: 0}),
    .COEF('{0: 256, 1: 2048, 2: 7168, 3: 14336, 4: 17920,
            5: 14336, 6: 7168, 7: 2048, 8: 256, default: 0})
  ) u_fir8 (
    .clk(clk), .rst(rst), .x(fir8_x), .x_take(fir8_x_take),
    .y(fir8_y), .y_valid(fir8_y_valid)
  );

  // c(k) = round(2^16 * (10 - |k - 9|) / 100), k = 0..18
  fir_filter #(
    .NSEC(4), .SEC_ORDER('{0: 4, 1: 4, 2: 4, 3: 3, default: 0}),
    .COEF('{0: 655, 1: 1311, 2: 1966, 3: 2621, 4: 3277, 5: 3932, 6: 4588,
            7: 5243, 8: 5898, 9: 6554, 10: 5898, 11: 5243, 12: 4588,
            13: 3932, 14: 3277, 15: 2621, 16: 1966, 17: 1311, 18: 655,
            default: 0})
  ) u_fir18 (
    .clk(clk), .rst(rst), .x(fir18_x), .x_take(fir18_x_take),
    .y(fir18_y), .y_valid(fir18_y_valid)
  );

endmodule
