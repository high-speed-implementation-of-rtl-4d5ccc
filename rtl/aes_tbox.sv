// aes_tbox: AES T-box, the S-box merged with the MixColumns coefficients.
//
// For input byte a with s = S(a) the output word is {2s, s, s, 3s} (most
// significant byte first): the contribution of a row-0 byte to its column
// after SubBytes and MixColumns. Rows 1..3 use the same word rotated right
// by 8, 16 and 24 bits, so one table serves every position. The plain S-box
// value is available as bits 23:16 for the final round.
// 256 x 32 ROM filled at elaboration time. Combinational, zero latency.
// The T-box idea comes from the source design; reusing one table by
// rotation and taking the final-round S-box from it are choices made here.
module aes_tbox
  import aes_pkg::*;
(
  input  byte_t a,
  output word_t t
);

  localparam tbox_rom_t ROM = tbox_rom_init();
  assign t = ROM[a];

endmodule
