// iir_cascade: high-order IIR filter built from low-order sections in series.
//
// Since LTI systems in series can be rearranged and grouped freely, a filter of
// order P1 + P2 + ... is built as a chain of iir_section sub-filters, each with
// its own small table (2^(2Pi+1) entries) instead of one table of
// 2^(2(P1+P2+...)+1) entries. Input, output and the links between sections are
// all bit-serial: the serial output of section i is the serial input of
// section i+1. Every section adds one frame of latency.
//
// Section s has order SEC_ORDER[s] (1 or 2) and reads its coefficients from
// A[3s..3s+2] (a0..a2) and B[3s+1..3s+2] (b1, b2).
module iir_cascade
  import bsf_pkg::*;
#(
  parameter int unsigned NSEC = 2,
  parameter sec_arr_t    SEC_ORDER = '{default: 2},
  parameter int unsigned XW = SAMPLE_W,
  parameter int unsigned W  = SAMPLE_W,
  // default: 60 Hz notch followed by 50 Hz notch at 1200 samples/s
  parameter coef_arr_t   A = '{0: 65536, 1: -124656, 2: 65536,
                               3: 65536, 4: -126464, 5: 65536, default: 0},
  parameter coef_arr_t   B = '{1: 121392, 2: -62150,
                               4: 123392, 5: -62150, default: 0}
) (
  input  logic   clk,
  input  logic   rst,
  input  frame_t fr,
  input  logic   x_in,
  output logic   y_out
);

  if (NSEC < 1 || NSEC > MAX_SECS || sec_max(SEC_ORDER, NSEC) > IIR_STRIDE - 1) begin : g_bad
    $error("iir_cascade: need 1..MAX_SECS sections of order 1 or 2");
  end

  logic link [NSEC+1];
  assign link[0] = x_in;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    iir_section #(
      .P(SEC_ORDER[s]), .XW(XW), .W(W), .OFS(s * IIR_STRIDE), .A(A), .B(B)
    ) u_sec (
      .clk(clk), .rst(rst), .fr(fr), .x_in(link[s]), .y_out(link[s+1])
    );
  end

  assign y_out = link[NSEC];

endmodule
