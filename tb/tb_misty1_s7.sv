// tb_misty1_s7: checks the MISTY1 S7 box in its table form (type 2) and
// its computed form (type 3): the first sixteen entries against the
// published S7 table, a permutation of all 128 inputs, and agreement of the
// two forms on every input.
module tb_misty1_s7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] x, y_tab, y_calc;
  misty1_s7 #(.SBOX_TYPE(2)) dut_tab  (.x(x), .y(y_tab));
  misty1_s7 #(.SBOX_TYPE(3)) dut_calc (.x(x), .y(y_calc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int known [16] = '{27, 50, 51, 90, 59, 16, 23, 84, 91, 26, 114, 115, 107, 44, 102, 73};
    bit seen_tab [128];
    bit seen_calc [128];
    seen_tab = '{default: 1'b0};
    seen_calc = '{default: 1'b0};
    for (int i = 0; i < 128; i++) begin
      x = 7'(i);
      #1;
      if (i < 16) check(int'(y_tab) == known[i], $sformatf("S7[%0d] = %0d, expected %0d", i, y_tab, known[i]));
      check(y_tab == y_calc, $sformatf("table and equations differ at %0d", i));
      check(!seen_tab[y_tab] && !seen_calc[y_calc], $sformatf("S7 output %0d repeated", y_tab));
      seen_tab[y_tab] = 1'b1;
      seen_calc[y_calc] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
