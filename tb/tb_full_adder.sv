// tb_full_adder: the eight rows of the full-adder truth table
// (Cy_in B C -> Cy_out Sum), written out as constants.
module tb_full_adder;
  logic b, c, cy_in, sum, cy_out;
  int checks = 0, failures = 0;
  full_adder dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // index = {Cy_in, B, C}; value = {Cy_out, Sum}
    logic [1:0] exp_tab [8] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b10, 2'b11};
    for (int i = 0; i < 8; i++) begin
      {cy_in, b, c} = 3'(i); #1;
      checks++;
      if ({cy_out, sum} !== exp_tab[i]) begin failures++; $display("FAIL row %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
