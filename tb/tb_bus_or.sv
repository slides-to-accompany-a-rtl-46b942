// tb_bus_or: random sources and random enable patterns on a 4-source,
// 8-bit bus; the bus must equal the OR of the enabled sources (0 when none
// is enabled).
module tb_bus_or;
  logic [3:0] en;
  logic [3:0][7:0] src;
  logic [7:0] q;
  int checks = 0, failures = 0;
  bus_or #(.W(8), .N(4)) dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] e;
      en  = 4'(i);
      src = {8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      #1;
      e = '0;
      for (int k = 0; k < 4; k++) if (en[k]) e = e | src[k];
      checks++;
      if (q !== e) begin failures++; $display("FAIL en=%b q=%h exp=%h", en, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
