// misty1_s7a: widened S7 table of the FI' function, 7-bit in, 16-bit out.
//
// S7A(x) = S7(x) xor (S7(x) << 9): the S7 result placed in both the low
// 7-bit field and the 7-bit field at bit 9, so that the two XORs that the
// original FI applies to it collapse into one 16-bit XOR. 128 x 16 ROM,
// filled at elaboration time. Combinational, zero latency.
module misty1_s7a
  import misty1_pkg::*;
(
  input  logic [6:0]  x,
  output logic [15:0] y
);

  localparam s7a_rom_t ROM = s7a_rom_init();
  assign y = ROM[x];

endmodule
