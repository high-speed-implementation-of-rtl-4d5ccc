// misty1_fo: MISTY1 FO function, 32-bit data.
//
// A three-round Feistel structure on 16-bit halves t0 (bits 31:16) and
// t1 (bits 15:0), each round keyed by a KO word and an FI with a KI word:
//   t0 = FI(t0 ^ KO1, KI1) ^ t1
//   t1 = FI(t1 ^ KO2, KI2) ^ t0
//   t0 = FI(t0 ^ KO3, KI3) ^ t1
//   out = {t1 ^ KO4, t0}
// The three FI units use the S-box implementation type SBOX_TYPE.
// Combinational, zero latency.
// The structure is that of the MISTY1 cipher definition, which the source
// design implements unchanged.
module misty1_fo
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  word32_t din,
  input  word16_t ko1, ko2, ko3, ko4,
  input  word16_t ki1, ki2, ki3,
  output word32_t dout
);

  word16_t t0a, t1a, t0b;
  word16_t fi1, fi2, fi3;

  misty1_fi #(.SBOX_TYPE(SBOX_TYPE)) u_fi1 (.din(din[31:16] ^ ko1), .ki(ki1), .dout(fi1));
  assign t0a = fi1 ^ din[15:0];
  misty1_fi #(.SBOX_TYPE(SBOX_TYPE)) u_fi2 (.din(din[15:0] ^ ko2), .ki(ki2), .dout(fi2));
  assign t1a = fi2 ^ t0a;
  misty1_fi #(.SBOX_TYPE(SBOX_TYPE)) u_fi3 (.din(t0a ^ ko3), .ki(ki3), .dout(fi3));
  assign t0b = fi3 ^ t1a;

  assign dout = {t1a ^ ko4, t0b};

endmodule
