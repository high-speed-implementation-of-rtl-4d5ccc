// tb_aes_round: checks one AES round with S-box types 2, 3 and 4 (T-box)
// against the reference round, as a middle round and as the final round
// without MixColumns, on random states and round keys, and on the first
// round of the FIPS-197 example (state after round 1 = a49c7ff2...).
module tb_aes_round;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] din, rk, y2, y3, y4;
  logic last;
  aes_round #(.SBOX_TYPE(2)) dut2 (.din, .rk, .last, .dout(y2));
  aes_round #(.SBOX_TYPE(3)) dut3 (.din, .rk, .last, .dout(y3));
  aes_round #(.SBOX_TYPE(4)) dut4 (.din, .rk, .last, .dout(y4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] e;
    // FIPS-197 Appendix B, round 1: input 193de3be..., round key a0fafe17...
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk  = 128'ha0fafe1788542cb123a339392a6c7605;
    last = 1'b0;
    #1;
    check(y2 == 128'ha49c7ff2689f352b6b5bea43026a5049 && y3 == y2 && y4 == y2,
          $sformatf("FIPS-197 round 1: %h %h %h", y2, y3, y4));
    for (int i = 0; i < 600; i++) begin
      din  = {$urandom, $urandom, $urandom, $urandom};
      rk   = {$urandom, $urandom, $urandom, $urandom};
      last = i[0];
      #1;
      e = a_round_ref(din, rk, last);
      check(y2 == e && y3 == e && y4 == e,
            $sformatf("round last=%0b on %h: %h %h %h expected %h", last, din, y2, y3, y4, e));
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
