// tb_misty1_fo: checks the MISTY1 FO function (types 2, 3 and 4) against
// the reference model. Random expanded keys are drawn and the FO subkeys of
// index k are picked from them exactly as the specification assigns them.
module tb_misty1_fo;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] din, y2, y3, y4;
  logic [15:0] ko1, ko2, ko3, ko4, ki1, ki2, ki3;
  misty1_fo #(.SBOX_TYPE(2)) dut2 (.din, .ko1, .ko2, .ko3, .ko4, .ki1, .ki2, .ki3, .dout(y2));
  misty1_fo #(.SBOX_TYPE(3)) dut3 (.din, .ko1, .ko2, .ko3, .ko4, .ki1, .ki2, .ki3, .dout(y3));
  misty1_fo #(.SBOX_TYPE(4)) dut4 (.din, .ko1, .ko2, .ko3, .ko4, .ki1, .ki2, .ki3, .dout(y4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] ek [16];
    logic [31:0] e;
    int k;
    for (int i = 0; i < 2000; i++) begin
      foreach (ek[j]) ek[j] = 16'($urandom);
      k = i % 8;
      din = $urandom;
      ko1 = ek[k]; ko2 = ek[(k + 2) % 8]; ko3 = ek[(k + 7) % 8]; ko4 = ek[(k + 4) % 8];
      ki1 = ek[(k + 5) % 8 + 8]; ki2 = ek[(k + 1) % 8 + 8]; ki3 = ek[(k + 3) % 8 + 8];
      #1;
      e = m_fo(din, k, ek);
      check(y2 == e && y3 == e && y4 == e,
            $sformatf("FO(%h) k=%0d: %h %h %h expected %h", din, k, y2, y3, y4, e));
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
