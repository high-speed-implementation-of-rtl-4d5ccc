// aes_round: one AES encryption round on a 128-bit state.
//
// Computes AddRoundKey(MixColumns(ShiftRows(SubBytes(state))), rk), or,
// when last is high, the final-round form without MixColumns.
// SBOX_TYPE 2 and 3: sixteen S-boxes (table or computed, see aes_sbox), then
// ShiftRows and MixColumns as XOR logic.
// SBOX_TYPE 4: sixteen T-boxes. Output column c is
//   T(a0) ^ ror8(T(a1)) ^ ror16(T(a2)) ^ ror24(T(a3)) ^ rk word c
// with a_r the byte of row r in column (c + r) mod 4 (ShiftRows folded into
// the addressing). In the last round the S-box byte of each T-box output
// is used instead.
// Ports: din, rk, last -> dout. Combinational, zero latency.
// The four transformations and the S-box/T-box variants follow the source
// design and FIPS-197.
module aes_round
  import aes_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  block128_t din,
  input  block128_t rk,
  input  logic      last,
  output block128_t dout
);

  state_t st, sh, mixed;

  assign st = to_state(din);

  if (SBOX_TYPE == 4) begin : g_tbox
    word_t t [16];
    // t[r + 4c] is the T-box output for the byte that ShiftRows moves to
    // row r of column c
    for (genvar c = 0; c < 4; c++) begin : g_col
      for (genvar r = 0; r < 4; r++) begin : g_row
        aes_tbox u_tbox (.a(st[r + 4*((c + r) % 4)]), .t(t[r + 4*c]));
        assign sh[r + 4*c] = t[r + 4*c][23:16];
      end
      word_t col;
      assign col = t[4*c] ^ {t[4*c+1][7:0], t[4*c+1][31:8]}
                 ^ {t[4*c+2][15:0], t[4*c+2][31:16]}
                 ^ {t[4*c+3][23:0], t[4*c+3][31:24]};
      for (genvar r = 0; r < 4; r++) begin : g_out
        assign mixed[r + 4*c] = col[31 - 8*r -: 8];
      end
    end
  end else begin : g_sbox
    state_t sb;
    for (genvar i = 0; i < 16; i++) begin : g_sb
      aes_sbox #(.SBOX_TYPE(SBOX_TYPE)) u_sbox (.a(st[i]), .s(sb[i]));
    end
    // ShiftRows: row r rotates left by r positions
    for (genvar c = 0; c < 4; c++) begin : g_col
      for (genvar r = 0; r < 4; r++) begin : g_row
        assign sh[r + 4*c] = sb[r + 4*((c + r) % 4)];
      end
      // MixColumns
      for (genvar r = 0; r < 4; r++) begin : g_mix
        assign mixed[r + 4*c] = xtime(sh[r + 4*c]) ^ xtime(sh[(r+1)%4 + 4*c]) ^ sh[(r+1)%4 + 4*c]
                              ^ sh[(r+2)%4 + 4*c] ^ sh[(r+3)%4 + 4*c];
      end
    end
  end

  assign dout = (last ? from_state(sh) : from_state(mixed)) ^ rk;

endmodule
