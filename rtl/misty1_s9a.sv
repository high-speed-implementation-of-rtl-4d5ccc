// misty1_s9a: widened S9 table of the FI' function, 9-bit in, 16-bit out.
//
// S9A(x) = S9(x) xor (x & 7f) xor ((x & 7f) << 9): besides S9 itself the
// table output carries the low 7 input bits into both 7-bit fields, which
// folds the data-dependent truncate-and-XOR steps of FI into the table.
// 512 x 16 ROM, filled at elaboration time. Combinational, zero latency.
module misty1_s9a
  import misty1_pkg::*;
(
  input  logic [8:0]  x,
  output logic [15:0] y
);

  localparam s9a_rom_t ROM = s9a_rom_init();
  assign y = ROM[x];

endmodule
