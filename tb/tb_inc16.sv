// tb_inc16: all 65536 addresses through the 16-bit incrementer, including
// the wrap from FFFF to 0000.
module tb_inc16;
  logic [15:0] a, q;
  int checks = 0, failures = 0;
  inc16 #(.W(16)) dut (.*);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i); #1;
      checks++;
      if (q !== 16'((i + 1) % 65536)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h q=%h", a, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
