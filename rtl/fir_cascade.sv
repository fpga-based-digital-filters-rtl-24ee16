// fir_cascade: high-order FIR filter built from low-order sub-filters.
//
// The input is passed serially from one fir_section to the next (each one
// delays it by its number of taps), so sub-filter s computes its share of the
// convolution over its own slice of the delay line. The sub-filter outputs are
// summed by a tree of bit-serial adders of depth ceil(log2 NSEC). Each level
// can add one bit, so the serial words are W = XW + ceil(log2 NSEC) bits long
// and the filter gives one result every W cycles; inside a sub-filter the extra
// cycles only carry sign extension.
//
// Sub-filter s has SEC_ORDER[s] + 1 taps and takes the next coefficients of COEF
// in order (c0 first). With an odd number of branches the last one of a tree
// level is passed on unchanged. Latency: the result for the sample entering in
// frame k leaves on y_out during frame k+1.
module fir_cascade
  import bsf_pkg::*;
#(
  parameter int unsigned NSEC = 2,
  parameter sec_arr_t    SEC_ORDER = '{0: 4, 1: 3, default: 0},
  parameter int unsigned XW = SAMPLE_W,
  parameter int unsigned W  = XW + $clog2(NSEC),
  // default: 9-tap binomial low-pass, scaled by 2^16
  parameter coef_arr_t   COEF = '{0: 256, 1: 2048, 2: 7168, 3: 14336, 4: 17920,
                                  5: 14336, 6: 7168, 7: 2048, 8: 256, default: 0}
) (
  input  logic   clk,
  input  logic   rst,
  input  frame_t fr,
  input  logic   x_in,
  output logic   y_out
);

  localparam int unsigned DEPTH = $clog2(NSEC);

  if (NSEC < 1 || NSEC > MAX_SECS || sec_sum(SEC_ORDER, NSEC) + NSEC > MAX_TAPS) begin : g_bad
    $error("fir_cascade: too many sections or taps");
  end

  // First coefficient of sub-filter s.
  function automatic int unsigned offset(input int unsigned s);
    return sec_sum(SEC_ORDER, s) + s;
  endfunction

  // Number of nodes on level l of the adder tree.
  function automatic int unsigned nodes(input int unsigned l);
    return (NSEC + (1 << l) - 1) >> l;
  endfunction

  logic xlink [NSEC+1];
  logic leaf  [NSEC];     // sub-filter outputs, the leaves of the adder tree

  assign xlink[0] = x_in;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    fir_section #(
      .P(SEC_ORDER[s]), .XW(XW), .W(W), .OFS(offset(s)), .COEF(COEF)
    ) u_sec (
      .clk(clk), .rst(rst), .fr(fr), .x_in(xlink[s]),
      .y_out(leaf[s]), .x_out(xlink[s+1])
    );
  end

  // Level l of the tree turns nodes(l) serial words into nodes(l+1).
  for (genvar l = 0; l < DEPTH; l++) begin : g_lvl
    logic lin  [nodes(l)];
    logic lout [nodes(l + 1)];
    for (genvar j = 0; j < nodes(l); j++) begin : g_in
      if (l == 0) begin : g_leaf
        assign lin[j] = leaf[j];
      end else begin : g_node
        assign lin[j] = g_lvl[l-1].lout[j];
      end
    end
    for (genvar j = 0; j < nodes(l + 1); j++) begin : g_out
      if (2 * j + 1 < nodes(l)) begin : g_add
        serial_adder u_add (
          .clk(clk), .rst(rst), .first(fr.first),
          .a(lin[2*j]), .b(lin[2*j+1]), .s(lout[j])
        );
      end else begin : g_pass
        assign lout[j] = lin[2*j];
      end
    end
  end

  if (DEPTH == 0) begin : g_single
    assign y_out = leaf[0];
  end else begin : g_root
    assign y_out = g_lvl[DEPTH-1].lout[0];
  end

endmodule
