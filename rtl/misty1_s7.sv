// misty1_s7: MISTY1 7-bit substitution box S7.
//
// Purely combinational. With SBOX_TYPE = 3 the output is computed from the
// Boolean (algebraic normal form) equations of S7; with any other type it is
// read from a 128 x 7 look-up table. The table is filled at elaboration time
// from the same equations, so both variants give identical results and only
// differ in how synthesis maps them (ROM/LUT versus logic).
// Ports: x (7-bit input), y (7-bit output). No clock, zero latency.
// The equations and both variants come from the source design; filling the
// table from the equations is this implementation's choice.
module misty1_s7
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  logic [6:0] x,
  output logic [6:0] y
);

  if (SBOX_TYPE == 3) begin : g_calc
    assign y = s7_eq(x);
  end else begin : g_table
    localparam s7_rom_t ROM = s7_rom_init();
    assign y = ROM[x];
  end

endmodule
