// misty1_keysched: MISTY1 key schedule, 128-bit key to 16 expanded words.
//
// The key is split into eight 16-bit words K0..K7 (K0 most significant).
// The expanded key is EK[i] = Ki and EK[8+i] = K'i = FI(Ki, K(i+1 mod 8))
// for i = 0..7. Eight FI units work in parallel, so the schedule is
// combinational; the core registers the result when a block is accepted.
// The expansion is the MISTY1 definition; doing it with eight parallel FI
// units is this implementation's choice.
module misty1_keysched
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  key128_t key,
  output ek_t     ek
);

  for (genvar i = 0; i < 8; i++) begin : g_word
    assign ek[i] = key_word(key, i);
    misty1_fi #(.SBOX_TYPE(SBOX_TYPE)) u_fi (
      .din (key_word(key, i)),
      .ki  (key_word(key, (i + 1) % 8)),
      .dout(ek[8 + i])
    );
  end

endmodule
