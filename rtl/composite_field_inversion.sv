// composite_field_inversion: GF(2^16) inverse computed in the composite field
// GF((2^8)^2).
//
// The input is mapped to b*x + c (b, c bytes, x^2 = x + PSI) by a constant
// 16x16 bit matrix. Then 1/(b*x + c) = D^-1 * (b*x + (b + c)) with
// D = PSI*b^2 + b*c + c^2, so only one GF(2^8) inversion (a^254, built from
// multipliers) and two GF(2^8) multiplications are needed before the result
// is mapped back to polynomial basis. The structure (transform, squarers,
// multiplication by PSI, byte inversion, two multipliers, detransform) follows
// the documented inversion unit; the byte field polynomial, PSI and the basis
// matrices are this design's choices (see bch_pkg).
//
// PIPE = 1 inserts one register stage after D is formed (the register
// insertion that lets the solver clock twice as fast): y is then the inverse
// of the a applied one clock earlier. PIPE = 0 is purely combinational.
// The inverse of 0 is returned as 0.
module composite_field_inversion
  import bch_pkg::*;
#(
  parameter bit PIPE = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  gf16_t a,
  output gf16_t y
);

  gf16_t comp;
  gf8_t  b, c, d;

  always_comb begin
    comp = '0;
    for (int i = 0; i < 16; i++)
      if (a[i]) comp ^= TO_COMPOSITE[i];
    b = comp[15:8];
    c = comp[7:0];
    d = gf8_mul(gf8_mul(b, b), PSI) ^ gf8_mul(b, c) ^ gf8_mul(c, c);
  end

  // stage boundary
  gf8_t d_s, b_s, bc_s;

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        d_s  <= '0;
        b_s  <= '0;
        bc_s <= '0;
      end else begin
        d_s  <= d;
        b_s  <= b;
        bc_s <= b ^ c;
      end
  end else begin : g_comb
    always_comb begin
      d_s  = d;
      b_s  = b;
      bc_s = b ^ c;
    end
  end

  gf8_t  dinv;
  gf16_t res;

  always_comb begin
    dinv = gf8_inv(d_s);
    res  = {gf8_mul(b_s, dinv), gf8_mul(bc_s, dinv)};
    y    = '0;
    for (int i = 0; i < 16; i++)
      if (res[i]) y ^= FROM_COMPOSITE[i];
  end

endmodule
