// tb_or_gate: exhaustive check of the relay OR circuit against its truth
// table (b c OUT: 00 0, 01 1, 10 1, 11 1).
module tb_or_gate;
  logic b, c, y;
  int checks = 0, failures = 0;
  or_gate dut (.b(b), .c(c), .y(y));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic exp_tab [4] = '{1'b0, 1'b1, 1'b1, 1'b1};
    for (int i = 0; i < 4; i++) begin
      {b, c} = 2'(i); #1;
      checks++;
      if (y !== exp_tab[i]) begin failures++; $display("FAIL bc=%b y=%0d", 2'(i), y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
