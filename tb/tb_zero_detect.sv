// tb_zero_detect: all 256 values; z must be 1 only for 0.
module tb_zero_detect;
  logic [7:0] d;
  logic z;
  int checks = 0, failures = 0;
  zero_detect #(.W(8)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      d = 8'(i); #1;
      checks++;
      if (z !== (i == 0)) begin failures++; $display("FAIL d=%h z=%0d", d, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
