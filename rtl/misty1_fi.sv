// misty1_fi: MISTY1 FI function, 16-bit data, 16-bit subkey KI.
//
// The input splits into a 9-bit half d9 (bits 15:7) and a 7-bit half d7
// (bits 6:0). In the standard form (SBOX_TYPE 1..3) it runs three steps:
//   d9 = S9(d9) ^ d7;  d7 = S7(d7) ^ d9[6:0];
//   d7 ^= KI[15:9];    d9 ^= KI[8:0];
//   d9 = S9(d9) ^ d7;  out = {d7, d9}
// With SBOX_TYPE = 4 it uses the rearranged FI' form: S7 moves beside the
// first S9 and the last steps become table look-ups in S7A and S9A,
//   d9'' = S9(d9) ^ d7 ^ KI[8:0]
//   out  = S7A(d7) ^ S9A(d9'') ^ spread(KI[15:9] ^ KI[6:0])
// where spread(v) = v | v << 9. Both forms give the same result; FI' has one
// S-box fewer in series. The key term depends on the subkey only.
// Combinational, zero latency.
// The S7A/S9A definitions come from the source design; the exact FI' data
// flow around them was derived here so that it equals the standard FI.
module misty1_fi
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  word16_t din,
  input  word16_t ki,
  output word16_t dout
);

  logic [8:0] d9_in, s9_first, d9_mid;
  logic [6:0] d7_in;

  assign d9_in = din[15:7];
  assign d7_in = din[6:0];

  misty1_s9 #(.SBOX_TYPE(SBOX_TYPE)) u_s9_first (.x(d9_in), .y(s9_first));

  if (SBOX_TYPE == 4) begin : g_fi_prime
    logic [15:0] s7a, s9a;
    logic [6:0]  kmix;
    assign d9_mid = s9_first ^ {2'b00, d7_in} ^ ki[8:0];
    assign kmix   = ki[15:9] ^ ki[6:0];
    misty1_s7a u_s7a (.x(d7_in),  .y(s7a));
    misty1_s9a u_s9a (.x(d9_mid), .y(s9a));
    assign dout = s7a ^ s9a ^ {kmix, 2'b00, kmix};
  end else begin : g_fi
    logic [6:0] s7, d7_mid;
    logic [8:0] d9_a, s9_second;
    assign d9_a   = s9_first ^ {2'b00, d7_in};
    misty1_s7 #(.SBOX_TYPE(SBOX_TYPE)) u_s7 (.x(d7_in), .y(s7));
    assign d7_mid = s7 ^ d9_a[6:0] ^ ki[15:9];
    assign d9_mid = d9_a ^ ki[8:0];
    misty1_s9 #(.SBOX_TYPE(SBOX_TYPE)) u_s9_second (.x(d9_mid), .y(s9_second));
    assign dout = {d7_mid, s9_second ^ {2'b00, d7_mid}};
  end

endmodule
