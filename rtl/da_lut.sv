// da_lut: lookup table of a distributed-arithmetic filter.
//
// For N coefficients c(0)..c(N-1) the table holds, at every address, the sum of
// the coefficients whose address bit is 1: address bit N-1-i selects c(i), so
// the first coefficient is on the most significant address bit. Entries are
// floor(2^7 * sum), with the coefficients given as integers scaled by 2^16
// (bsf_pkg); they are TW = 8 + ceil(log2 N) bits wide, as the table sizing in
// the design asks. The table is built at elaboration time from the coefficient
// parameters and read combinationally (a ROM). Elaboration fails if an entry
// does not fit in TW bits.
module da_lut
  import bsf_pkg::*;
#(
  parameter int unsigned NA  = 5,               // address bits = coefficients
  parameter int unsigned TW  = lut_width(NA),   // entry width
  parameter int unsigned OFS = 0,               // first coefficient used in COEF
  // default: the 50/60 Hz notch filter, order x(n), x(n-1), x(n-2), y(n-1), y(n-2)
  parameter coef_arr_t   COEF = '{0: 65536, 1: -124656, 2: 65536,
                                  3: 121392, 4: -62150, default: 0}
) (
  input  logic [NA-1:0]        addr,
  output logic signed [TW-1:0] f
);

  localparam int unsigned SHIFT = COEF_IN_FRAC - FRAC_W;

  function automatic longint entry(input int unsigned a);
    longint s;
    s = 0;
    for (int unsigned i = 0; i < NA; i++)
      if (((a >> (NA - 1 - i)) & 1) != 0) s += longint'(COEF[OFS + i]);
    return s >>> SHIFT;
  endfunction

  function automatic bit table_fits();
    bit ok;
    longint e;
    ok = 1'b1;
    for (int unsigned a = 0; a < (1 << NA); a++) begin
      e = entry(a);
      if (e >= (longint'(1) <<< (TW - 1)) || e < -(longint'(1) <<< (TW - 1))) ok = 1'b0;
    end
    return ok;
  endfunction

  if (!table_fits()) begin : g_overflow
    $error("da_lut: a coefficient sum does not fit in TW bits");
  end

  logic signed [TW-1:0] rom [2**NA];

  for (genvar g = 0; g < 2**NA; g++) begin : g_rom
    assign rom[g] = TW'(entry(g));
  end

  assign f = rom[addr];

endmodule
