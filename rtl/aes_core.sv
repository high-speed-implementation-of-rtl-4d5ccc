// aes_core: AES-128 encryption in a loop architecture.
//
// The loop body holds ROUNDS_PER_PASS rounds and runs once per clock. The
// default is two rounds, or one round with the computed S-box (type 3),
// whose loop body the source design limited to a single round. Before the
// first pass the block is XORed with the cipher key
// (initial AddRoundKey). Pass p performs rounds p*ROUNDS_PER_PASS + 1 ...;
// with two rounds per pass, four passes cover rounds 1-8 and a fifth pass
// performs rounds 9 and 10, the second unit then skipping MixColumns.
// Round keys are expanded on the fly: each round unit has its own key
// expansion step fed by the previous unit's round key, and the last round
// key of a pass is registered for the next pass.
// SBOX_TYPE selects the substitution implementation (see aes_round).
//
// Interface: valid/ready input. A block (pt, key) is accepted when
// in_valid && in_ready; ct is valid in the single cycle in which out_valid
// is high, 10 / ROUNDS_PER_PASS clocks after acceptance, and holds until
// the next result. A new block may be accepted in the cycle of the last
// pass, so blocks stream at one per 10 / ROUNDS_PER_PASS clocks.
// Reset: active-low asynchronous rst_n clears the control state.
// The loop architecture and the two-round body follow the source design;
// on-the-fly key expansion, the handshake and the reuse of the loop body for
// rounds 9 and 10 are this implementation's choices.
module aes_core
  import aes_pkg::*;
#(
  parameter int SBOX_TYPE       = 4,
  // one round per pass for the large computed S-box, two otherwise
  parameter int ROUNDS_PER_PASS = (SBOX_TYPE == 3) ? 1 : 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  block128_t pt,
  input  block128_t key,
  output logic      out_valid,
  output block128_t ct
);

  localparam int PASSES = 10 / ROUNDS_PER_PASS;
  localparam int PW     = (PASSES > 1) ? $clog2(PASSES) : 1;

  if (SBOX_TYPE < 2 || SBOX_TYPE > 4) begin : g_bad_type
    $error("SBOX_TYPE must be 2, 3 or 4");
  end

  block128_t state_q, rk_q;
  logic [PW-1:0] pass_q;
  logic      busy_q, last_pass, accept;

  block128_t st [ROUNDS_PER_PASS + 1];
  block128_t rk [ROUNDS_PER_PASS + 1];

  assign st[0] = state_q;
  assign rk[0] = rk_q;

  for (genvar u = 0; u < ROUNDS_PER_PASS; u++) begin : g_unit
    int    round_no;
    byte_t rc;
    assign round_no = int'(pass_q) * ROUNDS_PER_PASS + u + 1;
    always_comb begin
      rc = 8'h01;
      for (int i = 1; i < 10; i++)
        if (i < round_no) rc = xtime(rc);
    end
    aes_keyexp #(.SBOX_TYPE(SBOX_TYPE)) u_kx (.rk_in(rk[u]), .rc(rc), .rk_out(rk[u+1]));
    aes_round #(.SBOX_TYPE(SBOX_TYPE)) u_round (
      .din(st[u]), .rk(rk[u+1]), .last(round_no == 10), .dout(st[u+1]));
  end

  assign last_pass = busy_q && (pass_q == PW'(PASSES - 1));
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
        pass_q <= pass_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      state_q <= pt ^ key;
      rk_q    <= key;
    end else if (busy_q) begin
      state_q <= st[ROUNDS_PER_PASS];
      rk_q    <= rk[ROUNDS_PER_PASS];
    end
    if (last_pass) ct <= st[ROUNDS_PER_PASS];
  end

  initial assert (10 % ROUNDS_PER_PASS == 0)
    else $error("ROUNDS_PER_PASS must divide 10");

  // the pass counter never runs past the last pass
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> (int'(pass_q) < PASSES));

endmodule
