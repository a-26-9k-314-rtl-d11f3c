// gf16_multiplier: the single general GF(2^16) multiplier of the error
// magnitudes solver. Purely combinational, bit-parallel: the 16 partial
// products a*x^i (for the set bits of b) are summed into a 31-bit polynomial,
// which is then reduced modulo x^16 + x^5 + x^3 + x^2 + 1. The solver shares
// this one multiplier between its multiply-accumulate and divide steps, as the
// documented architecture does; the schoolbook-then-reduce structure is this
// design's choice.
module gf16_multiplier
  import bch_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t p
);

  always_comb p = gf16_mul(a, b);

endmodule
