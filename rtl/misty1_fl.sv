// misty1_fl: MISTY1 FL function, 32-bit data, two 16-bit subkeys.
//
// With halves d0 (bits 31:16) and d1 (bits 15:0):
//   d1 ^= d0 & kl_and;  d0 ^= d1 | kl_or;  out = {d0, d1}
// The core selects which expanded-key words serve as kl_and and kl_or.
// Combinational, zero latency.
// The structure is that of the MISTY1 cipher definition.
module misty1_fl
  import misty1_pkg::*;
(
  input  word32_t din,
  input  word16_t kl_and,
  input  word16_t kl_or,
  output word32_t dout
);

  word16_t d1;

  assign d1   = din[15:0] ^ (din[31:16] & kl_and);
  assign dout = {din[31:16] ^ (d1 | kl_or), d1};

endmodule
