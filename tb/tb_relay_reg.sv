// tb_relay_reg: random strobe/clear/load sequences on an 8-bit latching
// register, compared with a model: at a strobe, clear empties, load sets
// the bits that are 1 on the bus and never resets a bit; nothing changes
// without a strobe.
module tb_relay_reg;
  logic clk = 0, rst, strobe, clr, ld;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;
  relay_reg #(.W(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int or_loads = 0;
    rst = 1; strobe = 0; clr = 0; ld = 0; d = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++;
    if (q !== 8'h00) failures++;
    for (int i = 0; i < 3000; i++) begin
      strobe = 1'($urandom); clr = 1'($urandom); ld = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (strobe) begin
        if (ld && !clr && model != 0) or_loads++;
        model = (clr ? 8'h00 : model) | (ld ? d : 8'h00);
      end
      checks++;
      if (q !== model) begin failures++; if (failures < 10) $display("FAIL i=%0d q=%h exp=%h", i, q, model); end
    end
    checks++;
    if (or_loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
