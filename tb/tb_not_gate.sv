// tb_not_gate: exhaustive check of the relay NOT circuit against its truth
// table (in 0 -> out 1, in 1 -> out 0).
module tb_not_gate;
  logic in_b, out_b;
  int checks = 0, failures = 0;
  not_gate dut (.in_b(in_b), .out_b(out_b));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic exp_tab [2] = '{1'b1, 1'b0};
    for (int i = 0; i < 2; i++) begin
      in_b = 1'(i); #1;
      checks++;
      if (out_b !== exp_tab[i]) begin failures++; $display("FAIL in=%0d out=%0d", i, out_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
