// tb_adder8: every (B, C, carry-in) combination through the 8-bit ripple
// adder, compared with the integer sum split into Sum and Carry.
module tb_adder8;
  logic [7:0] b, c, sum;
  logic cy_in, carry;
  int checks = 0, failures = 0;
  adder8 #(.W(8)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 131072; i++) begin
      int total;
      {cy_in, b, c} = 17'(i); #1;
      total = int'(b) + int'(c) + int'(cy_in);
      checks++;
      if (sum !== total[7:0] || carry !== total[8]) begin
        failures++;
        if (failures < 10) $display("FAIL %h+%h+%0d -> %h %0d", b, c, cy_in, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
