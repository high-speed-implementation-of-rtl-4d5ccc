// tb_misty1_keysched: checks the MISTY1 key schedule (FI of types 2, 3
// and 4) against the reference expansion EK[i] = Ki, EK[8+i] = FI(Ki,
// K(i+1 mod 8)), on the published test key and on random keys.
module tb_misty1_keysched;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] key;
  misty1_pkg::ek_t ek2, ek3, ek4;
  misty1_keysched #(.SBOX_TYPE(2)) dut2 (.key, .ek(ek2));
  misty1_keysched #(.SBOX_TYPE(3)) dut3 (.key, .ek(ek3));
  misty1_keysched #(.SBOX_TYPE(4)) dut4 (.key, .ek(ek4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] e [16];
    for (int i = 0; i < 500; i++) begin
      key = (i == 0) ? 128'h00112233445566778899aabbccddeeff
                     : {$urandom, $urandom, $urandom, $urandom};
      #1;
      m_expand(key, e);
      for (int j = 0; j < 16; j++)
        check(ek2[j] == e[j] && ek3[j] == e[j] && ek4[j] == e[j],
              $sformatf("key %h EK[%0d]: %h %h %h expected %h", key, j, ek2[j], ek3[j], ek4[j], e[j]));
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
