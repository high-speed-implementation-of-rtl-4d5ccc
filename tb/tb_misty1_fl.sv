// tb_misty1_fl: checks the MISTY1 FL function against the reference model
// for even and odd FL indices (which differ only in subkey selection), on
// random data and random expanded keys.
module tb_misty1_fl;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] din, y;
  logic [15:0] kl_and, kl_or;
  misty1_fl dut (.din, .kl_and, .kl_or, .dout(y));

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
      k = i % 10;
      din = $urandom;
      if (k % 2 == 0) begin
        kl_and = ek[k / 2];
        kl_or  = ek[(k / 2 + 6) % 8 + 8];
      end else begin
        kl_and = ek[((k - 1) / 2 + 2) % 8 + 8];
        kl_or  = ek[((k - 1) / 2 + 4) % 8];
      end
      #1;
      e = m_fl(din, k, ek);
      check(y == e, $sformatf("FL(%h) k=%0d: %h expected %h", din, k, y, e));
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
