// misty1_s9: MISTY1 9-bit substitution box S9.
//
// Purely combinational. With SBOX_TYPE = 3 the output is computed from the
// Boolean (algebraic normal form) equations of S9; with any other type it is
// read from a 512 x 9 look-up table filled at elaboration time from the same
// equations.
// Ports: x (9-bit input), y (9-bit output). No clock, zero latency.
// The equations and both variants come from the source design; filling the
// table from the equations is this implementation's choice.
module misty1_s9
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  logic [8:0] x,
  output logic [8:0] y
);

  if (SBOX_TYPE == 3) begin : g_calc
    assign y = s9_eq(x);
  end else begin : g_table
    localparam s9_rom_t ROM = s9_rom_init();
    assign y = ROM[x];
  end

endmodule
