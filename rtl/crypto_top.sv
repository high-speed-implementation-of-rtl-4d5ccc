// crypto_top: the MISTY1 and AES-128 encryption circuits side by side.
//
// Two independent block-cipher engines, each with its own clock-domain-free
// valid/ready input, key input and one-cycle out_valid result strobe. They
// share only clk and rst_n.
//   MISTY1: 64-bit block, 128-bit key, 8 rounds, two rounds per clock,
//           result 4 clocks after acceptance, one block per 4 clocks.
//   AES-128: 128-bit block, 128-bit key, 10 rounds, AES_ROUNDS_PER_PASS
//           rounds per clock (default 2: result after 5 clocks, one block
//           per 5 clocks; 1 by default when AES_SBOX_TYPE is 3).
// MISTY1_SBOX_TYPE and AES_SBOX_TYPE pick the substitution-table
// implementation (2 duplicated tables, 3 computed, 4 expanded tables:
// S7A/S9A for MISTY1, T-boxes for AES). The default, type 4, is the variant
// the source design found fastest and most efficient for both ciphers.
module crypto_top
  import misty1_pkg::*;
  import aes_pkg::*;
#(
  parameter int MISTY1_SBOX_TYPE    = 4,
  parameter int AES_SBOX_TYPE       = 4,
  parameter int AES_ROUNDS_PER_PASS = (AES_SBOX_TYPE == 3) ? 1 : 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // MISTY1 engine
  input  logic      m_in_valid,
  output logic      m_in_ready,
  input  block64_t  m_pt,
  input  key128_t   m_key,
  output logic      m_out_valid,
  output block64_t  m_ct,
  // AES engine
  input  logic      a_in_valid,
  output logic      a_in_ready,
  input  block128_t a_pt,
  input  block128_t a_key,
  output logic      a_out_valid,
  output block128_t a_ct
);

  misty1_core #(.SBOX_TYPE(MISTY1_SBOX_TYPE)) u_misty1 (
    .clk, .rst_n,
    .in_valid(m_in_valid), .in_ready(m_in_ready), .pt(m_pt), .key(m_key),
    .out_valid(m_out_valid), .ct(m_ct)
  );

  aes_core #(.SBOX_TYPE(AES_SBOX_TYPE), .ROUNDS_PER_PASS(AES_ROUNDS_PER_PASS)) u_aes (
    .clk, .rst_n,
    .in_valid(a_in_valid), .in_ready(a_in_ready), .pt(a_pt), .key(a_key),
    .out_valid(a_out_valid), .ct(a_ct)
  );

endmodule
