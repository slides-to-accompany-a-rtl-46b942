// tb_shl8: all 256 values through the circular left shift; the expected
// value is (2*b mod 256) + (b div 128).
module tb_shl8;
  logic [7:0] b, q;
  int checks = 0, failures = 0;
  shl8 #(.W(8)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      int e;
      b = 8'(i); #1;
      e = ((2 * i) % 256) + (i / 128);
      checks++;
      if (q !== 8'(e)) begin failures++; $display("FAIL b=%h q=%h exp=%h", b, q, 8'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
