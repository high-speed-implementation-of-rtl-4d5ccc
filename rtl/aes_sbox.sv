// aes_sbox: AES S-box (SubBytes of one byte).
//
// With SBOX_TYPE = 3 the S-box is computed: the byte is mapped by a constant
// binary matrix into the composite field GF((2^4)^2), inverted there with
// GF(2^4) multipliers and one GF(2^4) inversion, mapped back, and put through
// the affine transformation. The two basis-change matrices are derived at
// elaboration time (see aes_pkg). With any other type the S-box is a 256 x 8
// look-up table filled at elaboration time from the GF(2^8) definition.
// Ports: a (input byte), s (output byte). Combinational, zero latency.
module aes_sbox
  import aes_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  byte_t a,
  output byte_t s
);

  if (SBOX_TYPE == 3) begin : g_calc
    localparam mat8_t TO_TOWER   = iso_init();
    localparam mat8_t FROM_TOWER = iso_inv_init(TO_TOWER);
    byte_t t, t_inv;
    assign t     = mat_apply(TO_TOWER, a);
    assign t_inv = tower_inv(t);
    assign s     = affine(mat_apply(FROM_TOWER, t_inv));
  end else begin : g_table
    localparam sbox_rom_t ROM = sbox_rom_init();
    assign s = ROM[a];
  end

endmodule
