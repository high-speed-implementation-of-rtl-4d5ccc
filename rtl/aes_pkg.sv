// aes_pkg: shared types and GF(2^8) arithmetic for the AES-128 encryption
// circuit.
//
// State layout: a 128-bit block is 16 bytes b0..b15 with b0 the most
// significant byte; byte r + 4c is row r, column c (FIPS-197 order).
// GF(2^8) uses the AES polynomial x^8 + x^4 + x^3 + x + 1.
// sbox_calc gives the S-box by its definition (inverse as x^254, 0 mapped
// to 0, then the affine transformation); it is evaluated only at elaboration
// time, to fill the S-box and T-box tables, so no table constants are
// written out. The computed S-box logic uses the composite-field functions
// at the end of the package.
package aes_pkg;

  typedef logic [127:0] block128_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef byte_t        state_t [16];

  typedef logic [7:0]  sbox_rom_t [256];
  typedef logic [31:0] tbox_rom_t [256];

  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 = a^2 * a^4 * ... * a^128 (0 -> 0)
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, acc;
    sq  = gf_mul(a, a);
    acc = sq;
    for (int i = 2; i < 8; i++) begin
      sq  = gf_mul(sq, sq);
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

  function automatic byte_t affine(input byte_t b);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    return affine(gf_inv(a));
  endfunction

  function automatic sbox_rom_t sbox_rom_init();
    sbox_rom_t r;
    for (int i = 0; i < 256; i++) r[i] = sbox_calc(8'(i));
    return r;
  endfunction

  // T-box entry: column contribution {2s, s, s, 3s} of one input byte on row 0
  function automatic tbox_rom_t tbox_rom_init();
    tbox_rom_t r;
    byte_t s;
    for (int i = 0; i < 256; i++) begin
      s    = sbox_calc(8'(i));
      r[i] = {xtime(s), s, s, xtime(s) ^ s};
    end
    return r;
  endfunction

  function automatic state_t to_state(input block128_t b);
    state_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic block128_t from_state(input state_t s);
    block128_t b;
    for (int i = 0; i < 16; i++) b[127 - 8*i -: 8] = s[i];
    return b;
  endfunction

  // round constant of round r = 1..10
  function automatic byte_t rcon(input int r);
    byte_t c;
    c = 8'h01;
    for (int i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // ---------------- composite field GF((2^4)^2) ----------------
  // GF(2^4) = GF(2)[z]/(z^4 + z + 1); GF(2^8) = GF(2^4)[y]/(y^2 + y + lambda)
  // with lambda the first GF(2^4) element that makes y^2 + y + lambda
  // irreducible. An element is {a1, a0} = a1*y + a0. The mapping between the
  // AES polynomial basis and this representation is a constant 8x8 binary
  // matrix, found at elaboration time (see iso_init).
  typedef logic [7:0] mat8_t [8];   // column i is the image of bit i

  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  // a^14 = a^-1 (0 -> 0)
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf16_mul(a, a);
    a4 = gf16_mul(a2, a2);
    a8 = gf16_mul(a4, a4);
    return gf16_mul(gf16_mul(a2, a4), a8);
  endfunction

  function automatic logic [3:0] tower_lambda();
    for (int l = 1; l < 16; l++) begin
      bit has_root;
      has_root = 1'b0;
      for (int t = 0; t < 16; t++)
        if ((gf16_mul(4'(t), 4'(t)) ^ 4'(t)) == 4'(l)) has_root = 1'b1;
      if (!has_root) return 4'(l);
    end
    return 4'h0;
  endfunction

  localparam logic [3:0] LAMBDA = tower_lambda();

  function automatic byte_t tower_mul(input byte_t a, input byte_t b);
    logic [3:0] hh;
    hh = gf16_mul(a[7:4], b[7:4]);
    return {hh ^ gf16_mul(a[7:4], b[3:0]) ^ gf16_mul(a[3:0], b[7:4]),
            gf16_mul(a[3:0], b[3:0]) ^ gf16_mul(hh, LAMBDA)};
  endfunction

  // (a1 y + a0)^-1 = a1 d^-1 y + (a0 + a1) d^-1,  d = a1^2 lambda + a1 a0 + a0^2
  function automatic byte_t tower_inv(input byte_t a);
    logic [3:0] d, di;
    d  = gf16_mul(gf16_mul(a[7:4], a[7:4]), LAMBDA) ^ gf16_mul(a[7:4], a[3:0])
       ^ gf16_mul(a[3:0], a[3:0]);
    di = gf16_inv(d);
    return {gf16_mul(a[7:4], di), gf16_mul(a[7:4] ^ a[3:0], di)};
  endfunction

  function automatic byte_t mat_apply(input mat8_t m, input byte_t x);
    byte_t r;
    r = '0;
    for (int i = 0; i < 8; i++)
      if (x[i]) r ^= m[i];
    return r;
  endfunction

  // AES basis -> tower basis: bit i of an AES byte stands for alpha^i with
  // alpha a root of x^8 + x^4 + x^3 + x + 1; its image is beta^i, beta being
  // a root of the same polynomial in the tower field.
  function automatic mat8_t iso_init();
    mat8_t m;
    byte_t beta, p, v;
    beta = 8'h00;
    for (int c = 2; c < 256; c++) begin
      byte_t b2, b3, b4, b8;
      b2 = tower_mul(8'(c), 8'(c));
      b3 = tower_mul(b2, 8'(c));
      b4 = tower_mul(b2, b2);
      b8 = tower_mul(b4, b4);
      v  = b8 ^ b4 ^ b3 ^ 8'(c) ^ 8'h01;
      if (v == 8'h00 && beta == 8'h00) beta = 8'(c);
    end
    p = 8'h01;
    for (int i = 0; i < 8; i++) begin
      m[i] = p;
      p    = tower_mul(p, beta);
    end
    return m;
  endfunction

  // tower basis -> AES basis: column j is the AES byte whose image is 1 << j
  function automatic mat8_t iso_inv_init(input mat8_t m);
    mat8_t r;
    for (int j = 0; j < 8; j++) begin
      r[j] = '0;
      for (int a = 1; a < 256; a++)
        if (mat_apply(m, 8'(a)) == 8'(1 << j)) r[j] = 8'(a);
    end
    return r;
  endfunction

endpackage
