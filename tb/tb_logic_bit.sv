// tb_logic_bit: exhaustive check of the 1-bit logic circuit against the
// table b c | NOT AND OR XOR = 00|1000 01|1011 10|0011 11|0110.
module tb_logic_bit;
  logic b, c, o_not, o_and, o_or, o_xor;
  int checks = 0, failures = 0;
  logic_bit dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [3:0] exp_tab [4] = '{4'b1000, 4'b1011, 4'b0011, 4'b0110};
    for (int i = 0; i < 4; i++) begin
      {b, c} = 2'(i); #1;
      checks++;
      if ({o_not, o_and, o_or, o_xor} !== exp_tab[i]) begin
        failures++; $display("FAIL bc=%b got %b", 2'(i), {o_not, o_and, o_or, o_xor});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
