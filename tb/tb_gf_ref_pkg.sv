// tb_gf_ref_pkg: reference Galois-field arithmetic for the testbenches.
//
// Written independently of the design: multiplication is the textbook
// shift-and-reduce loop (a is multiplied by x one step at a time and reduced
// at once), powers are repeated multiplication, and the inverse is
// a^(2^16 - 2). It also builds the BCH generator polynomial of the
// t = 12 DVB-S2 code as the product of the minimal polynomials of
// alpha^1, alpha^3, ..., alpha^23, for encoding test frames.
package tb_gf_ref_pkg;

  localparam logic [16:0] REF_POLY = 17'h1002D;

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    logic [15:0] r, s;
    r = '0;
    s = a;
    for (int i = 0; i < 16; i++) begin
      if (b[i]) r ^= s;
      s = s[15] ? ((s << 1) ^ REF_POLY[15:0]) : (s << 1);
    end
    return r;
  endfunction

  function automatic logic [15:0] ref_pow(logic [15:0] a, longint unsigned e);
    logic [15:0] r, s;
    r = 16'h0001;
    s = a;
    while (e != 0) begin
      if (e[0]) r = ref_mul(r, s);
      s = ref_mul(s, s);
      e >>= 1;
    end
    return r;
  endfunction

  function automatic logic [15:0] ref_alpha(longint unsigned e);
    return ref_pow(16'h0002, e % 65535);
  endfunction

  function automatic logic [15:0] ref_inv(logic [15:0] a);
    return ref_pow(a, 65534);
  endfunction

  // Generator polynomial of the binary BCH code with roots alpha^1..alpha^2t:
  // bit d of the result is the coefficient of x^d (degree 16*t for t <= 12).
  function automatic logic [255:0] ref_generator(int t);
    logic [15:0] poly [257];   // polynomial with GF(2^16) coefficients
    logic [15:0] nxt  [257];
    logic [255:0] g;
    logic [15:0] root;
    int deg;
    for (int d = 0; d < 257; d++) poly[d] = '0;
    poly[0] = 16'h0001;
    deg = 0;
    for (int j = 1; j < 2*t; j += 2) begin
      root = ref_alpha(j);
      for (int c = 0; c < 16; c++) begin   // the 16 conjugates alpha^(j*2^c)
        for (int d = 0; d < 257; d++) nxt[d] = ref_mul(poly[d], root);
        for (int d = 1; d < 257; d++) nxt[d] ^= poly[d-1];
        poly = nxt;
        deg++;
        root = ref_mul(root, root);
      end
    end
    g = '0;
    for (int d = 0; d < 256; d++) g[d] = poly[d][0];
    return g;
  endfunction

endpackage
