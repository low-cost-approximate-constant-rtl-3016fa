// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL. q() is the quantised product, g() the value an
// HBU multiplier with sub-ranges of 2^m must produce (base function of the
// offset plus the exact value at the start of the sub-range), g16() the
// three-part 16-bit product, and dct_basis() the scaled 2-D DCT basis.
//
// The formulas follow the published method; the DCT basis scaling matches
// this design's own choice in the RTL.
package tb_ref_pkg;

  function automatic longint q(longint c, longint x, int shift, bit rnd);
    if (shift == 0) return c * x;
    return (c * x + (rnd ? (longint'(1) << (shift - 1)) : 0)) / (longint'(1) << shift);
  endfunction

  function automatic longint g(longint c, int m, int shift, bit rnd, longint x);
    longint lo;
    lo = x % (longint'(1) << m);
    return q(c, lo, shift, rnd) + q(c, x - lo, shift, rnd);
  endfunction

  function automatic longint g16(longint c, int m, bit rnd, longint x);
    longint ch, cl, xh, xl, s;
    ch = c / 256; cl = c % 256; xh = x / 256; xl = x % 256;
    s = ch * xh + g(cl, m, 8, rnd, xh) + g(ch, m, 8, rnd, xl);
    return (s > 65535) ? 65535 : s;
  endfunction

  // basis of a BxB DCT scaled by 256*B/2 (1024 for B = 8)
  function automatic int dct_basis(int bs, int u, int v, int x, int y);
    real a, b, t;
    a = (u == 0) ? $sqrt(0.5) : $cos(3.141592653589793 * u * (2 * x + 1) / (2.0 * bs));
    b = (v == 0) ? $sqrt(0.5) : $cos(3.141592653589793 * v * (2 * y + 1) / (2.0 * bs));
    t = a * b * 256.0;
    return (t >= 0.0) ? int'($floor(t + 0.5)) : -int'($floor(-t + 0.5));
  endfunction

endpackage
