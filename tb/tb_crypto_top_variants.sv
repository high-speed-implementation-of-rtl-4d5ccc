// tb_crypto_top_variants: runs the top level in the two other substitution
// styles, once with duplicated tables (type 2) and once with computed
// S-boxes (type 3, AES then with its one-round loop body), for both
// ciphers. Each instance encrypts the published vectors and 40 random
// blocks per cipher, compared with the reference models; the AES latency
// must be 5 clocks for type 2 and 10 clocks for type 3.
module tb_crypto_top_variants;
  import crypto_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         m_in_valid, a_in_valid;
  logic [63:0]  m_pt;
  logic [127:0] m_key, a_pt, a_key;
  logic         m_rdy [2], m_ov [2], a_rdy [2], a_ov [2];
  logic [63:0]  m_ct [2];
  logic [127:0] a_ct [2];

  crypto_top #(.MISTY1_SBOX_TYPE(2), .AES_SBOX_TYPE(2)) dut2 (
    .clk, .rst_n, .m_in_valid, .m_in_ready(m_rdy[0]), .m_pt, .m_key, .m_out_valid(m_ov[0]), .m_ct(m_ct[0]),
    .a_in_valid, .a_in_ready(a_rdy[0]), .a_pt, .a_key, .a_out_valid(a_ov[0]), .a_ct(a_ct[0]));
  crypto_top #(.MISTY1_SBOX_TYPE(3), .AES_SBOX_TYPE(3)) dut3 (
    .clk, .rst_n, .m_in_valid, .m_in_ready(m_rdy[1]), .m_pt, .m_key, .m_out_valid(m_ov[1]), .m_ct(m_ct[1]),
    .a_in_valid, .a_in_ready(a_rdy[1]), .a_pt, .a_key, .a_out_valid(a_ov[1]), .a_ct(a_ct[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one block into both instances' engines; waits for all four results
  task automatic run(input logic [63:0] mp, input logic [127:0] mk,
                     input logic [127:0] ap, input logic [127:0] ak);
    logic [63:0]  m_exp;
    logic [127:0] a_exp;
    bit m_got [2], a_got [2];
    int n;
    m_exp = misty1_encrypt(mp, mk);
    a_exp = aes_encrypt(ap, ak);
    @(negedge clk);
    m_pt = mp; m_key = mk; a_pt = ap; a_key = ak;
    m_in_valid = 1'b1; a_in_valid = 1'b1;
    check(m_rdy[0] && m_rdy[1] && a_rdy[0] && a_rdy[1], "engines ready");
    @(negedge clk);
    m_in_valid = 1'b0; a_in_valid = 1'b0;
    m_got = '{default: 1'b0};
    a_got = '{default: 1'b0};
    n = 0;
    while (!(m_got[0] && m_got[1] && a_got[0] && a_got[1]) && n < 20) begin
      n++;
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        if (m_ov[i] && !m_got[i]) begin
          m_got[i] = 1'b1;
          check(m_ct[i] == m_exp, $sformatf("MISTY1 type %0d: %h expected %h", i + 2, m_ct[i], m_exp));
          check(n == 4, $sformatf("MISTY1 type %0d latency %0d", i + 2, n));
        end
        if (a_ov[i] && !a_got[i]) begin
          a_got[i] = 1'b1;
          check(a_ct[i] == a_exp, $sformatf("AES type %0d: %h expected %h", i + 2, a_ct[i], a_exp));
          check(n == (i == 0 ? 5 : 10), $sformatf("AES type %0d latency %0d", i + 2, n));
        end
      end
    end
    check(n < 20, "all results arrived");
  endtask

  initial begin
    m_in_valid = 1'b0; a_in_valid = 1'b0;
    m_pt = '0; m_key = '0; a_pt = '0; a_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(64'h0123456789abcdef, 128'h00112233445566778899aabbccddeeff,
        128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(misty1_encrypt(64'hfedcba9876543210, 128'h00112233445566778899aabbccddeeff) == 64'h04b68240b13be95d,
          "MISTY1 reference model, second published vector");
    for (int i = 0; i < 40; i++)
      run({$urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
          {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
