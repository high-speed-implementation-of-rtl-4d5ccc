// tb_aes_core: self-checking testbench of the AES-128 loop-architecture core.
//
// Four cores run side by side: S-box types 2, 3 and 4 with two rounds per
// pass, and type 3 with one round per pass. Each is checked against the
// FIPS-197 example vectors; on random blocks and keys all must agree. The
// latency must be 5 clocks (two rounds per pass) and 10 clocks (one round
// per pass), and a continuously offered stream must be accepted at one block
// per 5 clocks.
module tb_aes_core;
  import aes_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      in_valid;
  block128_t pt, key;
  logic      rdy [4];
  logic      ov  [4];
  block128_t ct  [4];

  aes_core #(.SBOX_TYPE(2))                       dut2  (.clk, .rst_n, .in_valid, .in_ready(rdy[0]), .pt, .key, .out_valid(ov[0]), .ct(ct[0]));
  aes_core #(.SBOX_TYPE(3), .ROUNDS_PER_PASS(2)) dut3  (.clk, .rst_n, .in_valid, .in_ready(rdy[1]), .pt, .key, .out_valid(ov[1]), .ct(ct[1]));
  aes_core #(.SBOX_TYPE(4))                       dut4  (.clk, .rst_n, .in_valid, .in_ready(rdy[2]), .pt, .key, .out_valid(ov[2]), .ct(ct[2]));
  aes_core #(.SBOX_TYPE(3), .ROUNDS_PER_PASS(1)) dut3s (.clk, .rst_n, .in_valid, .in_ready(rdy[3]), .pt, .key, .out_valid(ov[3]), .ct(ct[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // offer one block to all cores; collect each result and its latency
  task automatic encrypt(input block128_t p, input block128_t k,
                         output block128_t c [4], output int lat [4]);
    bit done [4];
    int n;
    @(negedge clk);
    pt = p; key = k; in_valid = 1'b1;
    check(rdy[0] && rdy[1] && rdy[2] && rdy[3], "cores ready");
    @(negedge clk);
    in_valid = 1'b0;
    n = 0;
    done = '{default: 1'b0};
    lat = '{default: 0};
    while (!(done[0] && done[1] && done[2] && done[3]) && n < 20) begin
      n++;
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        if (ov[i] && !done[i]) begin
          done[i] = 1'b1;
          lat[i]  = n;
          c[i]    = ct[i];
        end
    end
  endtask

  initial begin
    block128_t c [4];
    int lat [4];
    block128_t vk [2] = '{128'h000102030405060708090a0b0c0d0e0f, 128'h2b7e151628aed2a6abf7158809cf4f3c};
    block128_t vp [2] = '{128'h00112233445566778899aabbccddeeff, 128'h3243f6a8885a308d313198a2e0370734};
    block128_t vc [2] = '{128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h3925841d02dc09fbdc118597196a0b32};

    in_valid = 1'b0; pt = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int v = 0; v < 2; v++) begin
      encrypt(vp[v], vk[v], c, lat);
      for (int i = 0; i < 4; i++)
        check(c[i] == vc[v], $sformatf("core %0d vector %0d got %h", i, v, c[i]));
      check(lat[0] == 5 && lat[1] == 5 && lat[2] == 5, "latency 5 with two rounds per pass");
      check(lat[3] == 10, $sformatf("latency %0d with one round per pass, expected 10", lat[3]));
    end

    for (int t = 0; t < 100; t++) begin
      block128_t p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, c, lat);
      check(c[0] == c[2] && c[1] == c[2] && c[3] == c[2], $sformatf("cores disagree on %h", p));
    end

    begin
      int acc = 0, res = 0;
      @(negedge clk);
      pt = vp[1]; key = vk[1]; in_valid = 1'b1;
      for (int cyc = 0; cyc < 50; cyc++) begin
        if (rdy[2]) acc++;
        @(negedge clk);
        if (ov[2]) begin
          res++;
          check(ct[2] == vc[1], "streamed result");
        end
      end
      in_valid = 1'b0;
      check(acc == 10, $sformatf("accepted %0d blocks in 50 clocks, expected 10", acc));
      check(res >= 9, $sformatf("streaming produced %0d results", res));
    end

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
