// tb_aes_tbox: checks the AES T-box on all 256 inputs: the output word must
// be {2s, s, s, 3s} with s the reference S-box value, i.e. the MixColumns
// contribution of one substituted row-0 byte.
module tb_aes_tbox;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a;
  logic [31:0] t;
  aes_tbox dut (.a, .t);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] s;
    logic [31:0] e;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      s = a_sbox(a);
      e = {a_mul(s, 8'h02), s, s, a_mul(s, 8'h03)};
      check(t == e, $sformatf("T(%h)=%h expected %h", a, t, e));
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
