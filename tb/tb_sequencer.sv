// tb_sequencer: drives ticks with random gaps and, for each simulated
// instruction, a random length of 3..8 steps; checks the one-hot state
// after every tick, the done pulse at each instruction end, that nothing
// moves between ticks, and that halt freezes the chain.
module tb_sequencer;
  logic clk = 0, rst, tick, last, halt, done, halted;
  logic [7:0] state;
  int checks = 0, failures = 0;
  sequencer #(.STEPS(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int pos, len, dones;
    rst = 1; tick = 0; last = 0; halt = 0;
    @(posedge clk); #1;
    rst = 0;
    pos = 0; len = 3 + ($urandom % 6); dones = 0;
    for (int i = 0; i < 2000; i++) begin
      tick = 1'($urandom % 3 == 0);
      last = (pos == len - 1);
      @(posedge clk); #1;
      if (tick) begin
        if (last) begin
          pos = 0; len = 3 + ($urandom % 6);
          checks++; if (!done) failures++;
          dones++;
        end else pos++;
      end else begin
        checks++; if (done) failures++;
      end
      tick = 0;
      checks++;
      if (state !== 8'(1 << pos)) begin failures++; if (failures < 10) $display("FAIL i=%0d state=%b pos=%0d", i, state, pos); end
    end
    // halt
    tick = 1; halt = 1; last = 0;
    @(posedge clk); #1;
    tick = 0; halt = 0;
    checks++; if (!halted) failures++;
    begin
      logic [7:0] held;
      held = state;
      repeat (10) begin tick = 1; @(posedge clk); #1; end
      checks++; if (state !== held || !halted) failures++;
    end
    tick = 0;
    checks++; if (dones < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
