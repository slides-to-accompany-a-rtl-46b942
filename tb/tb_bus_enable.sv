// tb_bus_enable: every 8-bit value with Enable off (output must be 0) and
// on (output must equal the input).
module tb_bus_enable;
  logic en;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  bus_enable #(.W(8)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      {en, d} = 9'(i); #1;
      checks++;
      if (q !== (en ? d : 8'h00)) begin failures++; $display("FAIL en=%0d d=%h q=%h", en, d, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
