// misty1_core: 8-round MISTY1 encryption (64-bit block, 128-bit key) in a
// loop architecture with two rounds per loop-body pass.
//
// The loop body holds two FL pairs' worth of work and two FO functions:
//   D0 = FL(D0, 2p); D1 = FL(D1, 2p+1);
//   D1 ^= FO(D0, 2p); D0 ^= FO(D1, 2p+1);
// for pass p = 0..3, i.e. rounds 2p+1 and 2p+2. One pass takes one clock, so
// the body runs four times; the final FL layer (FL indices 8 and 9) and the
// half swap are applied on the way into the output register in the last
// pass. The subkeys of FL index n and FO index k follow the MISTY1
// specification (EK[0..7] = K, EK[8..15] = K'):
//   FL n=2p  : and-key EK[p],             or-key EK[8 + (p+6)%8]
//   FL n=2p+1: and-key EK[8 + (p+2)%8],   or-key EK[(p+4)%8]
//   FO k     : KO1..4 = EK[k], EK[(k+2)%8], EK[(k+7)%8], EK[(k+4)%8]
//              KI1..3 = EK[8+(k+5)%8], EK[8+(k+1)%8], EK[8+(k+3)%8]
// SBOX_TYPE selects the S-box implementation in every FI (see misty1_fi).
//
// Interface: valid/ready input. A block (pt, key) is accepted when
// in_valid && in_ready; the key schedule is computed combinationally from
// key and registered with the block. ct is valid for the single cycle in
// which out_valid is high, four clocks after acceptance, and stays in its
// register until the next result. A new block may be accepted in the cycle
// of the last pass, so blocks stream at one per four clocks.
// Reset: active-low asynchronous rst_n clears the control state.
// The loop architecture and two rounds per pass follow the source design;
// the handshake, the registering of the key schedule and the reset are this
// implementation's choices.
module misty1_core
  import misty1_pkg::*;
#(
  parameter int SBOX_TYPE = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  block64_t pt,
  input  key128_t  key,
  output logic     out_valid,
  output block64_t ct
);

  localparam int PASSES = 4;

  if (SBOX_TYPE < 2 || SBOX_TYPE > 4) begin : g_bad_type
    $error("SBOX_TYPE must be 2, 3 or 4");
  end

  ek_t      ek_in, ek_q;
  block64_t d_q;
  logic [1:0] pass_q;
  logic     busy_q;
  logic     last_pass, accept;

  misty1_keysched #(.SBOX_TYPE(SBOX_TYPE)) u_ks (.key(key), .ek(ek_in));

  // ---------------- subkey selection for pass p ----------------
  word16_t fla0_and, fla0_or, fla1_and, fla1_or;
  word16_t koa1, koa2, koa3, koa4, kia1, kia2, kia3;
  word16_t kob1, kob2, kob3, kob4, kib1, kib2, kib3;
  word16_t flf0_and, flf0_or, flf1_and, flf1_or;

  // EK[i] and EK[8+i] for a 3-bit index, i.e. index arithmetic modulo 8
  function automatic word16_t ek_k(input logic [2:0] i);
    return ek_q[{1'b0, i}];
  endfunction
  function automatic word16_t ek_kp(input logic [2:0] i);
    return ek_q[{1'b1, i}];
  endfunction

  always_comb begin
    logic [2:0] p, ka, kb;
    p  = {1'b0, pass_q};
    ka = {pass_q, 1'b0};          // FO index k = 2p
    kb = {pass_q, 1'b1};          // FO index k = 2p+1
    fla0_and = ek_k(p);
    fla0_or  = ek_kp(p + 3'd6);
    fla1_and = ek_kp(p + 3'd2);
    fla1_or  = ek_k(p + 3'd4);
    koa1 = ek_k(ka);            koa2 = ek_k(ka + 3'd2);
    koa3 = ek_k(ka + 3'd7);     koa4 = ek_k(ka + 3'd4);
    kia1 = ek_kp(ka + 3'd5);    kia2 = ek_kp(ka + 3'd1);    kia3 = ek_kp(ka + 3'd3);
    kob1 = ek_k(kb);            kob2 = ek_k(kb + 3'd2);
    kob3 = ek_k(kb + 3'd7);     kob4 = ek_k(kb + 3'd4);
    kib1 = ek_kp(kb + 3'd5);    kib2 = ek_kp(kb + 3'd1);    kib3 = ek_kp(kb + 3'd3);
    // final layer: FL index 8 (p = 4) and FL index 9
    flf0_and = ek_k(3'd4);      flf0_or = ek_kp(3'd2);
    flf1_and = ek_kp(3'd6);     flf1_or = ek_k(3'd0);
  end

  // ---------------- loop body: two rounds ----------------
  word32_t d0_fl, d1_fl, fo_a, d1_r1, fo_b, d0_r2;
  word32_t c0, c1;

  misty1_fl u_fl0 (.din(d_q[63:32]), .kl_and(fla0_and), .kl_or(fla0_or), .dout(d0_fl));
  misty1_fl u_fl1 (.din(d_q[31:0]),  .kl_and(fla1_and), .kl_or(fla1_or), .dout(d1_fl));

  misty1_fo #(.SBOX_TYPE(SBOX_TYPE)) u_fo_a (
    .din(d0_fl), .ko1(koa1), .ko2(koa2), .ko3(koa3), .ko4(koa4),
    .ki1(kia1), .ki2(kia2), .ki3(kia3), .dout(fo_a));
  assign d1_r1 = d1_fl ^ fo_a;

  misty1_fo #(.SBOX_TYPE(SBOX_TYPE)) u_fo_b (
    .din(d1_r1), .ko1(kob1), .ko2(kob2), .ko3(kob3), .ko4(kob4),
    .ki1(kib1), .ki2(kib2), .ki3(kib3), .dout(fo_b));
  assign d0_r2 = d0_fl ^ fo_b;

  // final FL layer and swap, used after the last pass
  misty1_fl u_flf0 (.din(d0_r2), .kl_and(flf0_and), .kl_or(flf0_or), .dout(c0));
  misty1_fl u_flf1 (.din(d1_r1), .kl_and(flf1_and), .kl_or(flf1_or), .dout(c1));

  // ---------------- control ----------------
  assign last_pass = busy_q && (pass_q == 2'(PASSES - 1));
  assign in_ready  = !busy_q || last_pass;
  assign accept    = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      pass_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last_pass;
      if (accept) begin
        busy_q <= 1'b1;
        pass_q <= '0;
      end else if (last_pass) begin
        busy_q <= 1'b0;
      end else if (busy_q) begin
        pass_q <= pass_q + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      d_q  <= pt;
      ek_q <= ek_in;
    end else if (busy_q) begin
      d_q  <= {d0_r2, d1_r1};
    end
    if (last_pass) ct <= {c1, c0};
  end

  // the pass counter never runs past the last pass
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> (int'(pass_q) < PASSES));

endmodule
