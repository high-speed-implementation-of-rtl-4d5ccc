// tb_aes_sbox: checks the AES S-box as a table (type 2) and computed
// (type 3) on all 256 inputs against a reference that finds each inverse by
// exhaustive search, plus three entries of the published table.
module tb_aes_sbox;
  import crypto_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, s_tab, s_calc;
  aes_sbox #(.SBOX_TYPE(2)) dut_tab  (.a, .s(s_tab));
  aes_sbox #(.SBOX_TYPE(3)) dut_calc (.a, .s(s_calc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] e;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      e = a_sbox(a);
      check(s_tab == e, $sformatf("table S(%h)=%h expected %h", a, s_tab, e));
      check(s_calc == e, $sformatf("computed S(%h)=%h expected %h", a, s_calc, e));
      if (i == 8'h00) check(s_tab == 8'h63, "S(00)");
      if (i == 8'h01) check(s_tab == 8'h7c, "S(01)");
      if (i == 8'h53) check(s_calc == 8'hed, "S(53)");
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
