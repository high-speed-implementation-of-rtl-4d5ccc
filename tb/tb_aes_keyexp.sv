// tb_aes_keyexp: checks the AES-128 key expansion step (S-box types 2, 3
// and 4) against the reference: the full ten-step schedule of the FIPS-197
// example key (last round key d014f9a8...) and random keys at every round.
module tb_aes_keyexp;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] rk_in, y2, y3, y4;
  logic [7:0]   rc;
  aes_keyexp #(.SBOX_TYPE(2)) dut2 (.rk_in, .rc, .rk_out(y2));
  aes_keyexp #(.SBOX_TYPE(3)) dut3 (.rk_in, .rc, .rk_out(y3));
  aes_keyexp #(.SBOX_TYPE(4)) dut4 (.rk_in, .rc, .rk_out(y4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] rcon_ref(input int r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < r; i++) c = a_mul(c, 8'h02);
    return c;
  endfunction

  initial begin
    logic [127:0] e;
    rk_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      rc = rcon_ref(r);
      #1;
      e = a_next_key(rk_in, r);
      check(y2 == e && y3 == e && y4 == e, $sformatf("FIPS key round %0d: %h expected %h", r, y2, e));
      rk_in = y4;
    end
    check(rk_in == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    for (int i = 0; i < 500; i++) begin
      int r;
      r = 1 + i % 10;
      rk_in = {$urandom, $urandom, $urandom, $urandom};
      rc = rcon_ref(r);
      #1;
      e = a_next_key(rk_in, r);
      check(y2 == e && y3 == e && y4 == e, $sformatf("round %0d from %h", r, rk_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
