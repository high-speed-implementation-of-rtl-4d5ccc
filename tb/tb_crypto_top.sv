// tb_crypto_top: end-to-end testbench of crypto_top at its default
// parameters (type-4 substitution tables, two rounds per clock for both
// ciphers).
//
// Both engines run at once. Each is fed a stream of random blocks with
// random keys; in_valid is held high in bursts and dropped at random, so
// that blocks are accepted both from idle and back to back in the cycle of
// the previous block's last pass. Every result is compared with the
// behavioural models of crypto_ref_pkg, and the published MISTY1 and
// FIPS-197 vectors go through first. The testbench counts the mechanisms
// exercised (idle acceptance, back-to-back acceptance per engine) and fails
// if one never occurred; it also checks the sustained rate of one MISTY1
// block per 4 clocks and one AES block per 5 clocks during a burst.
module tb_crypto_top;
  import crypto_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         m_in_valid, m_in_ready, m_out_valid;
  logic [63:0]  m_pt, m_ct;
  logic [127:0] m_key;
  logic         a_in_valid, a_in_ready, a_out_valid;
  logic [127:0] a_pt, a_key, a_ct;

  crypto_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int N_BLOCKS = 60;

  // expected-result queues and mechanism counters
  logic [63:0]  m_exp [$];
  logic [127:0] a_exp [$];
  int m_idle_acc = 0, m_b2b_acc = 0, a_idle_acc = 0, a_b2b_acc = 0;
  int m_res = 0, a_res = 0;
  bit m_busy = 0, a_busy = 0;
  bit m_done = 0, a_done = 0;
  int m_first_acc = -1, m_last_acc = -1, a_first_acc = -1, a_last_acc = -1;
  int cyc = 0;

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // scoreboard: sample at each rising edge what the DUT shows before it
  always @(posedge clk) if (rst_n) begin
    if (m_out_valid) begin
      check(m_exp.size() > 0 && m_ct == m_exp[0], $sformatf("MISTY1 result %0d: %h", m_res, m_ct));
      if (m_exp.size() > 0) void'(m_exp.pop_front());
      m_res++;
    end
    if (a_out_valid) begin
      check(a_exp.size() > 0 && a_ct == a_exp[0], $sformatf("AES result %0d: %h", a_res, a_ct));
      if (a_exp.size() > 0) void'(a_exp.pop_front());
      a_res++;
    end
    if (m_in_valid && m_in_ready) begin
      m_exp.push_back(misty1_encrypt(m_pt, m_key));
      if (m_busy) m_b2b_acc++; else m_idle_acc++;
    end
    if (a_in_valid && a_in_ready) begin
      a_exp.push_back(aes_encrypt(a_pt, a_key));
      if (a_busy) a_b2b_acc++; else a_idle_acc++;
    end
    // an engine is busy from acceptance until its last pass, the only busy
    // cycle in which it shows in_ready
    m_busy <= (m_in_valid && m_in_ready) || (m_busy && !m_in_ready);
    a_busy <= (a_in_valid && a_in_ready) || (a_busy && !a_in_ready);
  end

  // MISTY1 driver
  initial begin : m_drv
    int sent = 0;
    m_in_valid = 1'b0; m_pt = '0; m_key = '0;
    wait (rst_n);
    // published vector first
    @(negedge clk);
    m_pt = 64'h0123456789abcdef; m_key = 128'h00112233445566778899aabbccddeeff;
    m_in_valid = 1'b1;
    @(negedge clk);
    m_in_valid = 1'b0;
    check(64'h8b1da5f56ab3d07c == misty1_encrypt(64'h0123456789abcdef, 128'h00112233445566778899aabbccddeeff),
          "MISTY1 reference model against published vector");
    repeat (6) @(negedge clk);
    // a burst of 8 back-to-back blocks to check the rate
    m_in_valid = 1'b1;
    for (int b = 0; b < 8; b++) begin
      m_pt = {$urandom, $urandom};
      m_key = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      while (!m_accepted_last) @(negedge clk);
      if (b == 0) m_first_acc = cyc;
      m_last_acc = cyc;
    end
    m_in_valid = 1'b0;
    check(m_last_acc - m_first_acc == 7 * 4,
          $sformatf("MISTY1 burst: 8 blocks over %0d clocks, expected 28", m_last_acc - m_first_acc));
    // random traffic
    while (sent < N_BLOCKS) begin
      m_in_valid = ($urandom % 4) != 0;
      m_pt = {$urandom, $urandom};
      m_key = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      if (m_accepted_last) sent++;
    end
    m_in_valid = 1'b0;
    repeat (10) @(negedge clk);
    m_done = 1'b1;
  end

  // AES driver
  initial begin : a_drv
    int sent = 0;
    a_in_valid = 1'b0; a_pt = '0; a_key = '0;
    wait (rst_n);
    @(negedge clk);
    a_pt = 128'h00112233445566778899aabbccddeeff; a_key = 128'h000102030405060708090a0b0c0d0e0f;
    a_in_valid = 1'b1;
    @(negedge clk);
    a_in_valid = 1'b0;
    check(128'h69c4e0d86a7b0430d8cdb78070b4c55a == aes_encrypt(128'h00112233445566778899aabbccddeeff,
          128'h000102030405060708090a0b0c0d0e0f), "AES reference model against FIPS-197 vector");
    repeat (7) @(negedge clk);
    a_in_valid = 1'b1;
    for (int b = 0; b < 8; b++) begin
      a_pt = {$urandom, $urandom, $urandom, $urandom};
      a_key = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      while (!a_accepted_last) @(negedge clk);
      if (b == 0) a_first_acc = cyc;
      a_last_acc = cyc;
    end
    a_in_valid = 1'b0;
    check(a_last_acc - a_first_acc == 7 * 5,
          $sformatf("AES burst: 8 blocks over %0d clocks, expected 35", a_last_acc - a_first_acc));
    while (sent < N_BLOCKS) begin
      a_in_valid = ($urandom % 4) != 0;
      a_pt = {$urandom, $urandom, $urandom, $urandom};
      a_key = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      if (a_accepted_last) sent++;
    end
    a_in_valid = 1'b0;
    repeat (10) @(negedge clk);
    a_done = 1'b1;
  end

  // acceptance at the most recent rising edge
  logic m_accepted_last = 1'b0, a_accepted_last = 1'b0;
  always @(posedge clk) begin
    m_accepted_last <= m_in_valid && m_in_ready;
    a_accepted_last <= a_in_valid && a_in_ready;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (m_done && a_done);
    check(m_exp.size() == 0 && a_exp.size() == 0, "every accepted block produced a result");
    check(m_res == N_BLOCKS + 9, $sformatf("MISTY1 results %0d", m_res));
    check(a_res == N_BLOCKS + 9, $sformatf("AES results %0d", a_res));
    check(m_idle_acc > 0, "MISTY1 acceptance from idle happened");
    check(m_b2b_acc > 0, "MISTY1 back-to-back acceptance happened");
    check(a_idle_acc > 0, "AES acceptance from idle happened");
    check(a_b2b_acc > 0, "AES back-to-back acceptance happened");
    $display("mechanisms: MISTY1 idle=%0d back-to-back=%0d results=%0d; AES idle=%0d back-to-back=%0d results=%0d",
             m_idle_acc, m_b2b_acc, m_res, a_idle_acc, a_b2b_acc, a_res);
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
