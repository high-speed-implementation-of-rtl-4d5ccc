// crypto_ref_pkg: behavioural reference models used by the testbenches.
//
// Straight-line software formulations of MISTY1 (8 rounds, 128-bit key) and
// AES-128 encryption, written independently of the RTL datapaths: MISTY1
// follows the word-level description of FI/FO/FL and the key schedule with
// the subkey index arithmetic done on integers; AES finds each S-box inverse
// by exhaustive search and expands all eleven round keys up front. The MISTY1
// S-boxes reuse the equation functions of misty1_pkg, which the S-box
// testbenches check separately. Not synthesizable; simulation only.
package crypto_ref_pkg;

  // ---------------- MISTY1 ----------------
  function automatic logic [15:0] m_fi(input logic [15:0] fi_in, input logic [15:0] fi_key);
    int unsigned d9, d7;
    d9 = fi_in >> 7;
    d7 = fi_in & 'h7f;
    d9 = misty1_pkg::s9_eq(9'(d9)) ^ d7;
    d7 = misty1_pkg::s7_eq(7'(d7)) ^ (d9 & 'h7f);
    d7 = d7 ^ (fi_key >> 9);
    d9 = d9 ^ (fi_key & 'h1ff);
    d9 = misty1_pkg::s9_eq(9'(d9)) ^ d7;
    return 16'((d7 << 9) | d9);
  endfunction

  function automatic void m_expand(input logic [127:0] key, output logic [15:0] ek [16]);
    for (int i = 0; i < 8; i++) ek[i] = key[127 - 16*i -: 16];
    for (int i = 0; i < 8; i++) ek[i + 8] = m_fi(ek[i], ek[(i + 1) % 8]);
  endfunction

  function automatic logic [31:0] m_fo(input logic [31:0] fo_in, input int k, input logic [15:0] ek [16]);
    logic [15:0] t0, t1;
    t0 = fo_in[31:16];
    t1 = fo_in[15:0];
    t0 = t0 ^ ek[k];
    t0 = m_fi(t0, ek[(k + 5) % 8 + 8]);
    t0 = t0 ^ t1;
    t1 = t1 ^ ek[(k + 2) % 8];
    t1 = m_fi(t1, ek[(k + 1) % 8 + 8]);
    t1 = t1 ^ t0;
    t0 = t0 ^ ek[(k + 7) % 8];
    t0 = m_fi(t0, ek[(k + 3) % 8 + 8]);
    t0 = t0 ^ t1;
    t1 = t1 ^ ek[(k + 4) % 8];
    return {t1, t0};
  endfunction

  function automatic logic [31:0] m_fl(input logic [31:0] fl_in, input int k, input logic [15:0] ek [16]);
    logic [15:0] d0, d1;
    d0 = fl_in[31:16];
    d1 = fl_in[15:0];
    if (k % 2 == 0) begin
      d1 = d1 ^ (d0 & ek[k / 2]);
      d0 = d0 ^ (d1 | ek[(k / 2 + 6) % 8 + 8]);
    end else begin
      d1 = d1 ^ (d0 & ek[((k - 1) / 2 + 2) % 8 + 8]);
      d0 = d0 ^ (d1 | ek[((k - 1) / 2 + 4) % 8]);
    end
    return {d0, d1};
  endfunction

  function automatic logic [63:0] misty1_encrypt(input logic [63:0] p, input logic [127:0] key);
    logic [15:0] ek [16];
    logic [31:0] d0, d1;
    m_expand(key, ek);
    d0 = p[63:32];
    d1 = p[31:0];
    for (int r = 0; r < 8; r += 2) begin
      d0 = m_fl(d0, r, ek);
      d1 = m_fl(d1, r + 1, ek);
      d1 = d1 ^ m_fo(d0, r, ek);
      d0 = d0 ^ m_fo(d1, r + 1, ek);
    end
    d0 = m_fl(d0, 8, ek);
    d1 = m_fl(d1, 9, ek);
    return {d1, d0};
  endfunction

  // ---------------- AES-128 ----------------
  function automatic logic [7:0] a_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = (r[7] ? ({r[6:0], 1'b0} ^ 8'h1b) : {r[6:0], 1'b0});
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  function automatic logic [7:0] a_sbox(input logic [7:0] a);
    logic [7:0] inv, s;
    inv = 0;
    for (int c = 1; c < 256; c++)
      if (a_mul(a, 8'(c)) == 8'h01) inv = 8'(c);
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
      ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [127:0] a_round_ref(input logic [127:0] din, input logic [127:0] rk, input bit last);
    bytes16_t s, t;
    for (int i = 0; i < 16; i++) s[i] = a_sbox(din[127 - 8*i -: 8]);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[4*c + r] = s[4*((c + r) % 4) + r];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
        t[4*c]   = a_mul(a0, 2) ^ a_mul(a1, 3) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ a_mul(a1, 2) ^ a_mul(a2, 3) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ a_mul(a2, 2) ^ a_mul(a3, 3);
        t[4*c+3] = a_mul(a0, 3) ^ a1 ^ a2 ^ a_mul(a3, 2);
      end
    return {t[0], t[1], t[2], t[3], t[4], t[5], t[6], t[7],
            t[8], t[9], t[10], t[11], t[12], t[13], t[14], t[15]} ^ rk;
  endfunction

  function automatic logic [127:0] a_next_key(input logic [127:0] k, input int round);
    logic [31:0] w [4];
    logic [31:0] t;
    logic [7:0] rc;
    rc = 8'h01;
    for (int i = 1; i < round; i++) rc = a_mul(rc, 2);
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {a_sbox(w[3][23:16]) ^ rc, a_sbox(w[3][15:8]), a_sbox(w[3][7:0]), a_sbox(w[3][31:24])};
    w[0] = w[0] ^ t;
    w[1] = w[1] ^ w[0];
    w[2] = w[2] ^ w[1];
    w[3] = w[3] ^ w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] aes_encrypt(input logic [127:0] p, input logic [127:0] key);
    logic [127:0] st, rk;
    rk = key;
    st = p ^ key;
    for (int r = 1; r <= 10; r++) begin
      rk = a_next_key(rk, r);
      st = a_round_ref(st, rk, r == 10);
    end
    return st;
  endfunction

endpackage
