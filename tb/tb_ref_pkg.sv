// tb_ref_pkg: reference arithmetic for the decimation filter testbenches.
//
// Written independently of the RTL: the CIC filter is modelled as a plain
// FIR convolution with its impulse response, the coefficients of
// ((1 - z^-D) / (1 - z^-1))^N = (1 + z^-1 + ... + z^-(D-1))^N, obtained by
// repeated polynomial multiplication in 64-bit integers; the output stage is
// modelled with 64-bit arithmetic and explicit rounding and clamping.
package tb_ref_pkg;

  // Impulse response of an N-stage, decimate-by-D CIC filter; k >= N*(D-1)+1
  // entries are zero. Returned in a dynamic array of length N*(D-1)+1.
  function automatic void cic_kernel(input int n, input int d, output longint h[]);
    longint t[];
    h = new[1];
    h[0] = 1;
    for (int s = 0; s < n; s++) begin
      t = new[h.size() + d - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int j = 0; j < d; j++) t[i + j] += h[i];
      h = t;
    end
  endfunction

  // Wrap a 64-bit value into a w-bit two's-complement value.
  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) << w) - 1);
    if (m >= (longint'(1) << (w - 1))) m -= (longint'(1) << w);
    return m;
  endfunction

  // Round half up after dropping sh bits, then clamp to ow bits.
  function automatic longint round_clamp(input longint v, input int sh, input int ow,
                                         output bit clamped);
    longint r, hi, lo;
    r  = (v + (longint'(1) << (sh - 1))) >>> sh;
    hi = (longint'(1) << (ow - 1)) - 1;
    lo = -(longint'(1) << (ow - 1));
    clamped = (r > hi) || (r < lo);
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

endpackage
