// tb_ref_pkg: reference arithmetic for the bit-serial filter testbenches.
//
// Everything here works on whole integers, one sample at a time, straight from
// the filter equations: a table entry is floor(2^7 * sum of the selected
// coefficients) with coefficients scaled by 2^16, and the distributed-arithmetic
// output walks the sample bits LSB first with S = floor(S/2) + f, ending with
// S = floor(S/2) - f on the sign bit. The exact (unrounded) dot product is also
// given so testbenches can bound the truncation error.
package tb_ref_pkg;

  typedef longint vec_t [32];

  // Sign-extend the low w bits of v.
  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = (longint'(1) <<< w) - 1;
    v = v & m;
    if (v >= (longint'(1) <<< (w - 1))) v -= (longint'(1) <<< w);
    return v;
  endfunction

  // Distributed-arithmetic value of sum c[i] * v[i], i < n, over xw sample bits.
  function automatic longint da_eval(input vec_t c, input vec_t v, input int n,
                                     input int xw);
    longint s, f;
    s = 0;
    for (int b = 0; b < xw; b++) begin
      f = 0;
      for (int i = 0; i < n; i++) if (((v[i] >>> b) & 1) != 0) f += c[i];
      f = f >>> 9;
      if (b < xw - 1) s = (s >>> 1) + f;
      else            s = (s >>> 1) - f;
    end
    return s;
  endfunction

  // Exact dot product in units of 2^-7 (as a real number).
  function automatic real exact(input vec_t c, input vec_t v, input int n);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++) s += real'(c[i]) * real'(v[i]);
    return s / 65536.0;
  endfunction

  // Uniform random two's-complement value of w bits.
  function automatic longint rand_s(input int w);
    return wrap(longint'($urandom), w);
  endfunction

endpackage
