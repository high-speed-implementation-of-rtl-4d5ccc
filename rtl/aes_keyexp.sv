// aes_keyexp: one step of the AES-128 key expansion.
//
// From round key i-1 (words w0..w3, w0 most significant) and the round
// constant of round i it forms round key i:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 0, 0, 0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// SubWord uses four S-boxes of implementation type SBOX_TYPE (a plain
// S-box table when the rounds use T-boxes). Combinational, zero latency.
// The expansion is the FIPS-197 definition; computing it per round unit,
// on the fly, is this implementation's choice.
module aes_keyexp
  import aes_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  block128_t rk_in,
  input  byte_t     rc,
  output block128_t rk_out
);

  word_t w0, w1, w2, w3, rot, sub, t, n0, n1, n2;

  assign {w0, w1, w2, w3} = rk_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox #(.SBOX_TYPE(SBOX_TYPE)) u_sbox (.a(rot[8*i +: 8]), .s(sub[8*i +: 8]));
  end

  assign t  = sub ^ {rc, 24'h0};
  assign n0 = w0 ^ t;
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign rk_out = {n0, n1, n2, w3 ^ n2};

endmodule
