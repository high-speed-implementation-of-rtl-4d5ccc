// tb_misty1_core: self-checking testbench of the MISTY1 loop-architecture core.
//
// Three cores run side by side with S-box types 2 (duplicated tables),
// 3 (computed S-boxes) and 4 (FI' with S7A/S9A tables). Each is checked
// against the published MISTY1 test vectors (key 00112233..eeff), and on
// random blocks and keys the three must agree with each other. The latency
// from acceptance to out_valid must be four clocks, and back-to-back blocks
// must be accepted at one per four clocks.
module tb_misty1_core;
  import misty1_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     in_valid;
  block64_t pt;
  key128_t  key;
  logic     rdy2, rdy3, rdy4, ov2, ov3, ov4;
  block64_t ct2, ct3, ct4;

  misty1_core #(.SBOX_TYPE(2)) dut2 (.clk, .rst_n, .in_valid, .in_ready(rdy2), .pt, .key, .out_valid(ov2), .ct(ct2));
  misty1_core #(.SBOX_TYPE(3)) dut3 (.clk, .rst_n, .in_valid, .in_ready(rdy3), .pt, .key, .out_valid(ov3), .ct(ct3));
  misty1_core #(.SBOX_TYPE(4)) dut4 (.clk, .rst_n, .in_valid, .in_ready(rdy4), .pt, .key, .out_valid(ov4), .ct(ct4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // encrypt one block; returns the ciphertexts and the latency in clocks
  task automatic encrypt(input block64_t p, input key128_t k, output block64_t c2,
                         output block64_t c3, output block64_t c4, output int lat);
    @(negedge clk);
    pt = p; key = k; in_valid = 1'b1;
    check(rdy2 && rdy3 && rdy4, "core ready for a new block");
    @(negedge clk);
    in_valid = 1'b0;
    lat = 0;
    while (!ov4) begin
      @(negedge clk);
      lat++;
    end
    check(ov2 && ov3, "all types finish together");
    c2 = ct2; c3 = ct3; c4 = ct4;
  endtask

  initial begin
    block64_t c2, c3, c4;
    int lat;
    block64_t vec_pt [2] = '{64'h0123456789abcdef, 64'hfedcba9876543210};
    block64_t vec_ct [2] = '{64'h8b1da5f56ab3d07c, 64'h04b68240b13be95d};
    key128_t  vec_key = 128'h00112233445566778899aabbccddeeff;

    in_valid = 1'b0; pt = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 2; i++) begin
      encrypt(vec_pt[i], vec_key, c2, c3, c4, lat);
      check(c2 == vec_ct[i], $sformatf("type2 vector %0d got %h", i, c2));
      check(c3 == vec_ct[i], $sformatf("type3 vector %0d got %h", i, c3));
      check(c4 == vec_ct[i], $sformatf("type4 vector %0d got %h", i, c4));
      check(lat == 4, $sformatf("latency %0d, expected 4", lat));
    end

    for (int i = 0; i < 200; i++) begin
      block64_t p;
      key128_t  k;
      p = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, c2, c3, c4, lat);
      check(c2 == c4 && c3 == c4, $sformatf("types disagree on %h", p));
    end

    // streaming: hold in_valid high and count accepted blocks and results
    begin
      int acc = 0, res = 0;
      @(negedge clk);
      pt = vec_pt[0]; key = vec_key; in_valid = 1'b1;
      for (int cyc = 0; cyc < 40; cyc++) begin
        if (rdy4) acc++;
        @(negedge clk);
        if (ov4) begin
          res++;
          check(ct4 == vec_ct[0], "streamed result");
        end
      end
      in_valid = 1'b0;
      check(acc == 10, $sformatf("streaming accepted %0d blocks in 40 clocks, expected 10", acc));
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
