// gf_pkg: arithmetic in GF(2^13), the field of the (4200,4096) BCH code and of the
// (4200,4184) Reed-Solomon code that contains it.
//
// Elements are 13-bit vectors in polynomial basis over the primitive polynomial
// x^13 + x^4 + x^3 + x + 1; bit 0 is the constant term, so the field element "1" is
// 13'h0001 and alpha (written omega next to the decoder architecture) is 13'h0002.
// The field size is the one the decoder is specified for; the choice of primitive
// polynomial is this design's own (any primitive polynomial of degree 13 works).
//
// All functions are pure combinational logic. gf_mul is a shift-and-add multiplier
// (the same function as a 13x13 array multiplier), gf_pow/gf_alpha_pow use
// square-and-multiply and are meant for constants computed at elaboration time, and
// gf_inv raises to 2^13 - 2 (Fermat), also for constants.
package gf_pkg;

  localparam int unsigned M = 13;
  localparam logic [M-1:0] PRIM_LOW = 13'h001B;  // x^4 + x^3 + x + 1 (x^13 implied)
  localparam int unsigned FIELD_ORDER = (1 << M) - 1;  // 8191 nonzero elements

  typedef logic [M-1:0] gf_t;

  localparam gf_t GF_ONE   = 13'h0001;
  localparam gf_t GF_ALPHA = 13'h0002;

  // Multiply by x (one shift with reduction).
  function automatic gf_t gf_xtime(gf_t a);
    return {a[M-2:0], 1'b0} ^ (a[M-1] ? PRIM_LOW : '0);
  endfunction

  // Multiply two field elements: the sum of b_i * (a x^i), written out without a
  // loop so that elaborators unroll nothing.
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t s0, s1, s2, s3, s4, s5, s6, s7, s8, s9, s10, s11, s12;
    s0  = a;
    s1 = gf_xtime(s0);
    s2 = gf_xtime(s1);
    s3 = gf_xtime(s2);
    s4 = gf_xtime(s3);
    s5 = gf_xtime(s4);
    s6 = gf_xtime(s5);
    s7 = gf_xtime(s6);
    s8 = gf_xtime(s7);
    s9 = gf_xtime(s8);
    s10 = gf_xtime(s9);
    s11 = gf_xtime(s10);
    s12 = gf_xtime(s11);
    return ({M{b[0]}} & s0) ^
           ({M{b[1]}} & s1) ^
           ({M{b[2]}} & s2) ^
           ({M{b[3]}} & s3) ^
           ({M{b[4]}} & s4) ^
           ({M{b[5]}} & s5) ^
           ({M{b[6]}} & s6) ^
           ({M{b[7]}} & s7) ^
           ({M{b[8]}} & s8) ^
           ({M{b[9]}} & s9) ^
           ({M{b[10]}} & s10) ^
           ({M{b[11]}} & s11) ^
           ({M{b[12]}} & s12);
  endfunction

  // a^e for a non-negative exponent.
  function automatic gf_t gf_pow(gf_t a, int unsigned e);
    gf_t r;
    gf_t base;
    int unsigned ee;
    r    = GF_ONE;
    base = a;
    ee   = e % FIELD_ORDER;
    while (ee != 0) begin
      if (ee[0]) r = gf_mul(r, base);
      base = gf_mul(base, base);
      ee   = ee >> 1;
    end
    return r;
  endfunction

  // alpha^e.
  function automatic gf_t gf_alpha_pow(int unsigned e);
    return gf_pow(GF_ALPHA, e);
  endfunction

  // alpha^(2^b) for b = 0..M-1, the constants of gf_alpha_pow_var.
  typedef gf_t [M-1:0] pow2_tab_t;
  function automatic pow2_tab_t make_pow2_tab();
    pow2_tab_t t;
    t[0] = GF_ALPHA;
    for (int unsigned b = 1; b < M; b++) t[b] = gf_mul(t[b-1], t[b-1]);
    return t;
  endfunction
  localparam pow2_tab_t ALPHA_POW2 = make_pow2_tab();

  // alpha^e for a variable exponent e < 2^13 - 1: one constant multiplier per exponent
  // bit (by alpha^(2^b)), selected by that bit. Synthesizable.
  function automatic gf_t gf_alpha_pow_var(logic [M-1:0] e);
    gf_t r;
    r = GF_ONE;
    for (int unsigned b = 0; b < M; b++)
      if (e[b]) r = gf_mul(r, ALPHA_POW2[b]);
    return r;
  endfunction

  // Multiplicative inverse (0 maps to 0).
  function automatic gf_t gf_inv(gf_t a);
    return gf_pow(a, FIELD_ORDER - 1);
  endfunction

  // Column constant of the shortened code at an interpolation position i < two_t:
  //   w_i = alpha^i * prod_{j < two_t, j != i} (alpha^i + alpha^j).
  // A received value at position i is multiplied by w_i (and by sf(alpha^i)) to become
  // an interpolation point after the coordinate transformation; 1/w_i plays the part
  // of v(alpha^i) in the polynomial selection test.
  function automatic gf_t gf_col_const(int unsigned i, int unsigned two_t);
    gf_t x;
    x = gf_alpha_pow(i);
    for (int unsigned j = 0; j < two_t; j++)
      if (j != i) x = gf_mul(x, gf_alpha_pow(i) ^ gf_alpha_pow(j));
    return x;
  endfunction

endpackage
