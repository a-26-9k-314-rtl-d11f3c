// bch_pkg: constants and Galois-field helpers shared by the soft BCH decoder.
//
// The decoder works on the DVB-S2 normal-frame BCH code (32400, 32208), t = 12,
// over GF(2^16). Elements are 16-bit vectors in polynomial basis, bit i being the
// coefficient of alpha^i, with the field polynomial
// p(x) = x^16 + x^5 + x^3 + x^2 + 1 (the DVB-S2 polynomial g1(x); the code
// length, t and the field size follow the decoder's documented configuration,
// the polynomial itself is the broadcast standard's).
//
// The composite-field inversion views GF(2^16) as GF((2^8)^2): an element is
// b*x + c with b, c in GF(2^8) (generated by x^8 + x^4 + x^3 + x^2 + 1) and
// x^2 = x + PSI. PSI = 0x20 is the smallest byte of trace 1, which makes
// x^2 + x + PSI irreducible. The basis change is linear: TO_COMPOSITE[i] is the
// image of alpha^i, i.e. theta^i where theta = 0x334 is the smallest composite
// element with p(theta) = 0; FROM_COMPOSITE[i] is the preimage of the unit
// vector 1<<i. Both were obtained by that search and are checked by the
// testbenches, which compare every inversion against a^(2^16 - 2).
package bch_pkg;

  localparam int unsigned M        = 16;        // GF(2^M) symbol width
  localparam int unsigned N_CODE   = 32400;     // BCH code length n
  localparam int unsigned K_CODE   = 32208;     // BCH message length k
  localparam int unsigned T_CORR   = 12;        // error-correcting capability t
  localparam int unsigned RW       = 6;         // reliability (|LLR|) width
  localparam logic [M:0]  POLY16   = 17'h1002D; // x^16 + x^5 + x^3 + x^2 + 1
  localparam logic [8:0]  POLY8    = 9'h11D;    // x^8 + x^4 + x^3 + x^2 + 1
  localparam logic [7:0]  PSI      = 8'h20;

  typedef logic [M-1:0] gf16_t;
  typedef logic [7:0]   gf8_t;

  localparam gf16_t TO_COMPOSITE [16] = '{
    16'h0001, 16'h0334, 16'h05D9, 16'h9D8D, 16'h1198, 16'hD5EB, 16'h5F6D, 16'h8167,
    16'h1CE9, 16'h082D, 16'hD2B0, 16'h3757, 16'h8585, 16'hFB4C, 16'h12D6, 16'h5ECF};
  localparam gf16_t FROM_COMPOSITE [16] = '{
    16'h0001, 16'h0189, 16'h406C, 16'h17B6, 16'hC40A, 16'hF87A, 16'h6A5D, 16'h4379,
    16'h3ACA, 16'h46D4, 16'hC057, 16'hADA1, 16'hAA1F, 16'hF1E5, 16'h7E4B, 16'hE989};

  // GF(2^16) product, polynomial basis.
  function automatic gf16_t gf16_mul(gf16_t a, gf16_t b);
    logic [2*M-2:0] p;
    p = '0;
    for (int i = 0; i < M; i++)
      if (b[i]) p ^= (2*M-1)'(a) << i;
    for (int i = 2*M-2; i >= M; i--)
      if (p[i]) p ^= (2*M-1)'(POLY16) << (i - M);
    return p[M-1:0];
  endfunction

  // GF(2^8) product, polynomial basis.
  function automatic gf8_t gf8_mul(gf8_t a, gf8_t b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--)
      if (p[i]) p ^= 15'(POLY8) << (i - 8);
    return p[7:0];
  endfunction

  // GF(2^8) inverse as a^254 = (a^127)^2, with a^(2^j - 1) built by the chain
  // u <- u^2 * a (6 multiplications, 7 squarings). Maps 0 to 0.
  function automatic gf8_t gf8_inv(gf8_t a);
    gf8_t u;
    u = a;
    for (int j = 0; j < 6; j++) u = gf8_mul(gf8_mul(u, u), a);
    return gf8_mul(u, u);
  endfunction

  // a^e in GF(2^16) by square-and-multiply (used for constants).
  function automatic gf16_t gf16_pow(gf16_t a, int unsigned e);
    gf16_t r, s;
    r = 16'h0001;
    s = a;
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = gf16_mul(r, s);
      s = gf16_mul(s, s);
    end
    return r;
  endfunction

  // alpha^e for the primitive element alpha = x.
  function automatic gf16_t alpha_pow(int unsigned e);
    return gf16_pow(16'h0002, e % ((1 << M) - 1));
  endfunction

endpackage
