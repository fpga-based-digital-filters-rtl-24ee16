// bsf_pkg: constants and types shared by the bit-serial distributed-arithmetic
// filters.
//
// Samples are 8-bit two's-complement fractions x0.x-1...x-7 (weight of x0 is -1).
// Coefficients are given to the filters as integers scaled by 2^16 so that each
// lookup-table entry can be formed as floor(2^7 * sum of the selected
// coefficients), which is how the published table of the 50/60 Hz notch
// filter is built. The table therefore has 7 fractional bits, i.e. the 8-bit
// coefficient precision the filters use. Coefficient lists are passed as fixed-size
// int arrays (coef_arr_t); a filter reads only the first entries it needs.
package bsf_pkg;

  // Bits per input sample (l+1 in the equations).
  localparam int unsigned SAMPLE_W  = 8;
  // Coefficient precision m.
  localparam int unsigned COEF_M    = 8;
  // Fractional bits of a lookup-table entry (and of every filter output).
  localparam int unsigned FRAC_W    = 7;
  // Fractional bits of the coefficient integers handed to the filters.
  localparam int unsigned COEF_IN_FRAC = 16;

  // Largest number of coefficients a single parameter array can carry
  // (enough for a hundredth-order FIR filter).
  localparam int unsigned MAX_TAPS  = 128;
  // Largest number of sub-filters in a cascade.
  localparam int unsigned MAX_SECS  = 32;
  // Coefficient stride per IIR section in a cascade (sections of order <= 2).
  localparam int unsigned IIR_STRIDE = 3;

  typedef int coef_arr_t [MAX_TAPS];

  // Timing strobes of one serial word (frame), decoded from the bit counter.
  // A frame is W cycles; the sample occupies its first XW cycles, LSB first.
  typedef struct packed {
    logic first;      // bit 0 (LSB) is on the serial lines
    logic value_bit;  // a value bit x(-l)..x(-1): accumulator adds
    logic sign_bit;   // the sign bit x(0): accumulator subtracts
    logic last;       // final cycle of the frame: results are stored, S cleared
  } frame_t;
  typedef int sec_arr_t  [MAX_SECS];

  // Width of a lookup-table entry: m + ceil(log2(number of summed coefficients)).
  function automatic int unsigned lut_width(input int unsigned n_coef);
    return COEF_M + $clog2(n_coef);
  endfunction

  // Sum of the first n entries of a sec_arr_t.
  function automatic int unsigned sec_sum(input sec_arr_t a, input int unsigned n);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < n; i++) s += a[i];
    return s;
  endfunction

  // Largest of the first n entries of a sec_arr_t.
  function automatic int unsigned sec_max(input sec_arr_t a, input int unsigned n);
    int unsigned m;
    m = 0;
    for (int unsigned i = 0; i < n; i++) if (a[i] > m) m = a[i];
    return m;
  endfunction

endpackage
