// tb_logic8: all 65536 (B, C) pairs through the 8-bit logic circuit,
// compared with bitwise NOT/AND/OR/XOR computed in the testbench.
module tb_logic8;
  logic [7:0] b, c, o_not, o_and, o_or, o_xor;
  int checks = 0, failures = 0;
  logic8 #(.W(8)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 65536; i++) begin
      {b, c} = 16'(i); #1;
      checks++;
      if (o_not !== ~b || o_and !== (b & c) || o_or !== (b | c) || o_xor !== (b ^ c)) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h c=%h", b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
