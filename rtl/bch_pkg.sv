// bch_pkg: GF(16) arithmetic and constants of the (15,5) BCH code.
//
// Field: GF(2^4) built on the primitive polynomial x^4 + x + 1, primitive
// element alpha = x (4'b0010). Elements are 4-bit vectors of polynomial
// coefficients. The (15,5) BCH code has the generator
//   g(x) = m1(x) m3(x) m5(x) = x^10 + x^8 + x^5 + x^4 + x^2 + x + 1,
// minimum distance 7; the decoder here corrects up to two bit errors per
// 15-bit word and flags heavier damage.
// All functions are loops over constants and synthesise to XOR networks.
package bch_pkg;

  localparam int unsigned N = 15;   // code length
  localparam int unsigned K = 5;    // data bits per word
  localparam logic [10:0] GEN_POLY = 11'b101_0011_0111;  // g(x), bit i = coeff of x^i

  typedef logic [3:0] gf16_t;

  // product of two field elements
  function automatic gf16_t gf_mul(gf16_t a, gf16_t b);
    logic [6:0] p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // alpha^k for any k >= 0
  function automatic gf16_t gf_alpha_pow(int unsigned k);
    gf16_t r = 4'b0001;
    for (int unsigned i = 0; i < (k % 15); i++)
      r = gf_mul(r, 4'b0010);
    return r;
  endfunction

  // multiplicative inverse (a != 0): a^14
  function automatic gf16_t gf_inv(gf16_t a);
    gf16_t r = 4'b0001;
    for (int i = 0; i < 14; i++)
      r = gf_mul(r, a);
    return r;
  endfunction

  // syndrome r(alpha^i) of a 15-bit word, bit j = coefficient of x^j
  function automatic gf16_t syndrome(logic [N-1:0] r, int unsigned i);
    gf16_t s = '0;
    for (int unsigned j = 0; j < N; j++)
      if (r[j]) s ^= gf_alpha_pow(i * j);
    return s;
  endfunction

endpackage
