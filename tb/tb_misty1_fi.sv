// tb_misty1_fi: checks the MISTY1 FI function in its standard form with
// table S-boxes (type 2), with computed S-boxes (type 3), and in the FI'
// form with S7A/S9A tables (type 4) against the reference model, on 4000
// random data/subkey pairs and on the all-zero and all-one corners.
module tb_misty1_fi;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] din, ki, y2, y3, y4;
  misty1_fi #(.SBOX_TYPE(2)) dut2 (.din, .ki, .dout(y2));
  misty1_fi #(.SBOX_TYPE(3)) dut3 (.din, .ki, .dout(y3));
  misty1_fi #(.SBOX_TYPE(4)) dut4 (.din, .ki, .dout(y4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] e;
    for (int i = 0; i < 4002; i++) begin
      din = (i == 0) ? 16'h0000 : (i == 1) ? 16'hffff : 16'($urandom);
      ki  = (i == 0) ? 16'h0000 : (i == 1) ? 16'hffff : 16'($urandom);
      #1;
      e = m_fi(din, ki);
      check(y2 == e, $sformatf("type2 FI(%h,%h)=%h expected %h", din, ki, y2, e));
      check(y3 == e, $sformatf("type3 FI(%h,%h)=%h expected %h", din, ki, y3, e));
      check(y4 == e, $sformatf("type4 FI'(%h,%h)=%h expected %h", din, ki, y4, e));
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
