// tb_decoder3to8: the eight rows of the 3-to-8 decoder table, f0 f1 f2 in,
// the one-hot OUTPUT row (leftmost column = output 0) expected.
module tb_decoder3to8;
  logic [2:0] f;
  logic [7:0] y;
  int checks = 0, failures = 0;
  decoder3to8 dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // rows of the table, output 0 written first
    logic [0:7] rows [8] = '{8'b10000000, 8'b01000000, 8'b00100000, 8'b00010000,
                             8'b00001000, 8'b00000100, 8'b00000010, 8'b00000001};
    for (int i = 0; i < 8; i++) begin
      logic [7:0] e;
      f = 3'(i); #1;
      for (int k = 0; k < 8; k++) e[k] = rows[i][k];
      checks++;
      if (y !== e) begin failures++; $display("FAIL f=%b y=%b exp=%b", f, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
