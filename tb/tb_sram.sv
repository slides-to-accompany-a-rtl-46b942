// tb_sram: fills the full 32K x 8 RAM with a pattern, then mixes random
// writes and asynchronous reads, comparing with a copy kept in the
// testbench; also checks that a write only lands on the clock edge.
module tb_sram;
  logic clk = 0, we;
  logic [14:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [32768];
  int checks = 0, failures = 0;
  sram #(.BYTES(32768)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0;
    for (int a = 0; a < 32768; a++) begin
      addr = 15'(a); wdata = 8'((a * 7 + 3) % 256); we = 1;
      model[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < 32768; a += 97) begin
      addr = 15'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; if (failures < 10) $display("FAIL rd %h", a); end
    end
    for (int i = 0; i < 5000; i++) begin
      addr = 15'($urandom); wdata = 8'($urandom); we = 1'($urandom);
      #1;
      // before the edge the old value is still read
      checks++;
      if (rdata !== model[addr]) begin failures++; if (failures < 10) $display("FAIL pre %h", addr); end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++;
      if (rdata !== model[addr]) begin failures++; if (failures < 10) $display("FAIL post %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
