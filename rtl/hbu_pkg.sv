// hbu_pkg: constants and elaboration-time functions shared by the hybrid
// binary-unary (HBU) constant-coefficient multipliers and the DCT / FFT engines
// built from them.
//
// qmul() is the reference quantiser used to build every routing network and
// bias table: it returns C*x shifted right by SHIFT bits, either floored or
// rounded half-up. With SHIFT = 0 it is the exact product (non-truncated
// multiplier); with SHIFT = N it is the N-bit result of an N x N product
// (truncated multiplier). core_len() is the number of output wires of a unary
// core, and first_reach() the input wire that drives a given output wire.
//
// dct_coef() and the twiddle functions compute the constants of the two
// engines at elaboration time from $cos/$sin, so no table is stored in a file.
//
// The quantiser (floor or round) and the base-plus-bias split follow the
// published method; the bias rule b_r = q(C*r*2^M), the DCT basis scaling and
// the 16-bit twiddle format are this design's own choices.
package hbu_pkg;

  // Quantised product q(C*x) = floor or round of C*x / 2^SHIFT.
  function automatic longint qmul(longint c, longint x, int shift, bit round_en);
    longint p;
    p = c * x;
    if (shift == 0) return p;
    if (round_en) p = p + (longint'(1) <<< (shift - 1));
    return p >>> shift;
  endfunction

  // Number of thermometer wires leaving a unary core whose input covers 0..2^m-1.
  function automatic int core_len(longint c, int m, int shift, bit round_en);
    return int'(qmul(c, (longint'(1) <<< m) - 1, shift, round_en));
  endfunction

  // Smallest input value x (1..2^m-1) with q(C*x) > j: output wire j of the
  // unary core is a copy of input wire x-1 (the wire that is set when input >= x).
  function automatic int first_reach(longint c, int m, int shift, bit round_en, int j);
    longint need, x;
    // q(C*x) > j  <=>  C*x + r >= (j+1)*2^shift, r the rounding offset
    need = (longint'(j) + 1) <<< shift;
    if (shift > 0 && round_en) need = need - (longint'(1) <<< (shift - 1));
    x = (need + c - 1) / c;
    if (x < 1) x = 1;
    if (x > (longint'(1) <<< m) - 1) x = (longint'(1) <<< m) - 1;
    return int'(x);
  endfunction

  // Bit width needed to hold the unsigned value v (at least 1).
  function automatic int width_of(longint v);
    int w;
    w = 1;
    while ((longint'(1) <<< w) <= v) w++;
    return w;
  endfunction

  // BxB 2-D DCT-II basis value T(u,v,x,y) scaled by 256*B/2 and rounded:
  // T = 2/B C(u) C(v) cos((2x+1)u pi/2B) cos((2y+1)v pi/2B), C(0)=1/sqrt(2),
  // else 1, so the scaled value is 256 C(u) C(v) cos() cos(), whose largest
  // magnitude (246 for B = 8) fits 8 bits. For B = 8 the scale is 1024.
  function automatic int dct_coef(int b, int u, int v, int x, int y);
    real pi, cu, cv, t;
    pi = 3.14159265358979323846;
    cu = (u == 0) ? 0.70710678118654752 : 1.0;
    cv = (v == 0) ? 0.70710678118654752 : 1.0;
    t  = 256.0 * cu * cv * $cos((2.0 * x + 1.0) * u * pi / (2.0 * b))
                         * $cos((2.0 * y + 1.0) * v * pi / (2.0 * b));
    return int'($floor(t + 0.5));
  endfunction

  // Width of a BxB DCT output: B*B signed terms of at most 127.
  function automatic int dct_out_w(int b);
    return $clog2(b * b * 128) + 1;
  endfunction

  // Twiddle W_n^k = cos(2 pi k/n) - j sin(2 pi k/n), each part as a 16-bit
  // magnitude (scale 65536, clipped to 65535) and a sign.
  function automatic int tw_mag(real v);
    int m;
    m = int'($floor(((v < 0.0) ? -v : v) * 65536.0 + 0.5));
    return (m > 65535) ? 65535 : m;
  endfunction

  function automatic real tw_re(int n, int k);
    return $cos(2.0 * 3.14159265358979323846 * k / n);
  endfunction

  function automatic real tw_im(int n, int k);
    return -$sin(2.0 * 3.14159265358979323846 * k / n);
  endfunction

endpackage
