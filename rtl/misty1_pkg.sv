// misty1_pkg: shared constants, types and Boolean S-box equations for the
// MISTY1 encryption circuit.
//
// s7_eq / s9_eq evaluate the algebraic normal form of the MISTY1 S-boxes
// S7 and S9 (bit 0 is the least significant bit of input and output).
// They are used two ways: directly as logic in the computed S-box variant
// (implementation type 3), and at elaboration time to fill the look-up
// tables of the other variants, so that no table constants are pasted in.
// The tables S7A and S9A are the widened 16-bit tables of the FI' form:
//   S7A(x) = S7(x) xor (S7(x) << 9)
//   S9A(x) = S9(x) xor (x & 7f) xor ((x & 7f) << 9)
package misty1_pkg;

  // S-box implementation types:
  //   1: one shared table of each kind (not provided by this RTL, see README)
  //   2: one table instance per access (tables duplicated)
  //   3: S7 and S9 computed from their Boolean equations
  //   4: widened tables S7A / S9A in the rearranged FI' function
  typedef logic [15:0] word16_t;
  typedef logic [31:0] word32_t;
  typedef logic [63:0] block64_t;
  typedef logic [127:0] key128_t;

  // Sixteen expanded-key words: EK[0..7] = K, EK[8..15] = K'
  typedef word16_t ek_t [16];

  typedef logic [6:0]  s7_rom_t  [128];
  typedef logic [8:0]  s9_rom_t  [512];
  typedef logic [15:0] s7a_rom_t [128];
  typedef logic [15:0] s9a_rom_t [512];

  function automatic logic [6:0] s7_eq(input logic [6:0] x);
    logic [6:0] y;
    y[0] = x[0] ^ (x[1]&x[3]) ^ (x[0]&x[3]&x[4]) ^ (x[1]&x[5]) ^ (x[0]&x[2]&x[5])
         ^ (x[4]&x[5]) ^ (x[0]&x[1]&x[6]) ^ (x[2]&x[6]) ^ (x[0]&x[5]&x[6])
         ^ (x[3]&x[5]&x[6]) ^ 1'b1;
    y[1] = (x[0]&x[2]) ^ (x[0]&x[4]) ^ (x[3]&x[4]) ^ (x[1]&x[5]) ^ (x[2]&x[4]&x[5])
         ^ x[6] ^ (x[0]&x[6]) ^ (x[3]&x[6]) ^ (x[2]&x[3]&x[6]) ^ (x[1]&x[4]&x[6])
         ^ (x[0]&x[5]&x[6]) ^ 1'b1;
    y[2] = (x[1]&x[2]) ^ (x[0]&x[2]&x[3]) ^ x[4] ^ (x[1]&x[4]) ^ (x[0]&x[1]&x[4])
         ^ (x[0]&x[5]) ^ (x[0]&x[4]&x[5]) ^ (x[3]&x[4]&x[5]) ^ (x[1]&x[6])
         ^ (x[3]&x[6]) ^ (x[0]&x[3]&x[6]) ^ (x[4]&x[6]) ^ (x[2]&x[4]&x[6]);
    y[3] = x[0] ^ x[1] ^ (x[0]&x[1]&x[2]) ^ (x[0]&x[3]) ^ (x[2]&x[4])
         ^ (x[1]&x[4]&x[5]) ^ (x[2]&x[6]) ^ (x[1]&x[3]&x[6]) ^ (x[0]&x[4]&x[6])
         ^ (x[5]&x[6]) ^ 1'b1;
    y[4] = (x[2]&x[3]) ^ (x[0]&x[4]) ^ (x[1]&x[3]&x[4]) ^ x[5] ^ (x[2]&x[5])
         ^ (x[1]&x[2]&x[5]) ^ (x[0]&x[3]&x[5]) ^ (x[1]&x[6]) ^ (x[1]&x[5]&x[6])
         ^ (x[4]&x[5]&x[6]) ^ 1'b1;
    y[5] = x[0] ^ x[1] ^ x[2] ^ (x[0]&x[1]&x[2]) ^ (x[0]&x[3]) ^ (x[1]&x[2]&x[3])
         ^ (x[1]&x[4]) ^ (x[0]&x[2]&x[4]) ^ (x[0]&x[5]) ^ (x[0]&x[1]&x[5])
         ^ (x[3]&x[5]) ^ (x[0]&x[6]) ^ (x[2]&x[5]&x[6]);
    y[6] = (x[0]&x[1]) ^ x[3] ^ (x[0]&x[3]) ^ (x[2]&x[3]&x[4]) ^ (x[0]&x[5])
         ^ (x[2]&x[5]) ^ (x[3]&x[5]) ^ (x[1]&x[3]&x[5]) ^ (x[1]&x[6])
         ^ (x[1]&x[2]&x[6]) ^ (x[0]&x[3]&x[6]) ^ (x[4]&x[6]) ^ (x[2]&x[5]&x[6]);
    return y;
  endfunction

  function automatic logic [8:0] s9_eq(input logic [8:0] x);
    logic [8:0] y;
    y[0] = (x[0]&x[4]) ^ (x[0]&x[5]) ^ (x[1]&x[5]) ^ (x[1]&x[6]) ^ (x[2]&x[6])
         ^ (x[2]&x[7]) ^ (x[3]&x[7]) ^ (x[3]&x[8]) ^ (x[4]&x[8]) ^ 1'b1;
    y[1] = (x[0]&x[2]) ^ x[3] ^ (x[1]&x[3]) ^ (x[2]&x[3]) ^ (x[3]&x[4]) ^ (x[4]&x[5])
         ^ (x[0]&x[6]) ^ (x[2]&x[6]) ^ x[7] ^ (x[0]&x[8]) ^ (x[3]&x[8]) ^ (x[5]&x[8])
         ^ 1'b1;
    y[2] = (x[0]&x[1]) ^ (x[1]&x[3]) ^ x[4] ^ (x[0]&x[4]) ^ (x[2]&x[4]) ^ (x[3]&x[4])
         ^ (x[4]&x[5]) ^ (x[0]&x[6]) ^ (x[5]&x[6]) ^ (x[1]&x[7]) ^ (x[3]&x[7]) ^ x[8];
    y[3] = x[0] ^ (x[1]&x[2]) ^ (x[2]&x[4]) ^ x[5] ^ (x[1]&x[5]) ^ (x[3]&x[5])
         ^ (x[4]&x[5]) ^ (x[5]&x[6]) ^ (x[1]&x[7]) ^ (x[6]&x[7]) ^ (x[2]&x[8])
         ^ (x[4]&x[8]);
    y[4] = x[1] ^ (x[0]&x[3]) ^ (x[2]&x[3]) ^ (x[0]&x[5]) ^ (x[3]&x[5]) ^ x[6]
         ^ (x[2]&x[6]) ^ (x[4]&x[6]) ^ (x[5]&x[6]) ^ (x[6]&x[7]) ^ (x[2]&x[8])
         ^ (x[7]&x[8]);
    y[5] = x[2] ^ (x[0]&x[3]) ^ (x[1]&x[4]) ^ (x[3]&x[4]) ^ (x[1]&x[6]) ^ (x[4]&x[6])
         ^ x[7] ^ (x[3]&x[7]) ^ (x[5]&x[7]) ^ (x[6]&x[7]) ^ (x[0]&x[8]) ^ (x[7]&x[8]);
    y[6] = (x[0]&x[1]) ^ x[3] ^ (x[1]&x[4]) ^ (x[2]&x[5]) ^ (x[4]&x[5]) ^ (x[2]&x[7])
         ^ (x[5]&x[7]) ^ x[8] ^ (x[0]&x[8]) ^ (x[4]&x[8]) ^ (x[6]&x[8]) ^ (x[7]&x[8])
         ^ 1'b1;
    y[7] = x[1] ^ (x[0]&x[1]) ^ (x[1]&x[2]) ^ (x[2]&x[3]) ^ (x[0]&x[4]) ^ x[5]
         ^ (x[1]&x[6]) ^ (x[3]&x[6]) ^ (x[0]&x[7]) ^ (x[4]&x[7]) ^ (x[6]&x[7])
         ^ (x[1]&x[8]) ^ 1'b1;
    y[8] = x[0] ^ (x[0]&x[1]) ^ (x[1]&x[2]) ^ x[4] ^ (x[0]&x[5]) ^ (x[2]&x[5])
         ^ (x[3]&x[6]) ^ (x[5]&x[6]) ^ (x[0]&x[7]) ^ (x[0]&x[8]) ^ (x[3]&x[8])
         ^ (x[6]&x[8]) ^ 1'b1;
    return y;
  endfunction

  function automatic s7_rom_t s7_rom_init();
    s7_rom_t r;
    for (int i = 0; i < 128; i++) r[i] = s7_eq(7'(i));
    return r;
  endfunction

  function automatic s9_rom_t s9_rom_init();
    s9_rom_t r;
    for (int i = 0; i < 512; i++) r[i] = s9_eq(9'(i));
    return r;
  endfunction

  function automatic s7a_rom_t s7a_rom_init();
    s7a_rom_t r;
    logic [6:0] s;
    for (int i = 0; i < 128; i++) begin
      s    = s7_eq(7'(i));
      r[i] = {s, 2'b00, s};
    end
    return r;
  endfunction

  function automatic s9a_rom_t s9a_rom_init();
    s9a_rom_t r;
    logic [8:0] x;
    for (int i = 0; i < 512; i++) begin
      x    = 9'(i);
      r[i] = {x[6:0], s9_eq(x) ^ {2'b00, x[6:0]}};
    end
    return r;
  endfunction

  // Word k of the 128-bit key, k = 0 being the most significant.
  function automatic word16_t key_word(input key128_t key, input int k);
    return key[127 - 16*k -: 16];
  endfunction

endpackage
