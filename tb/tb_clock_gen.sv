// tb_clock_gen: with DIV = 2, checks that the phases {A,B,C,D} step through
// 0000 1000 1100 1110 1111 0111 0011 0001, one step every DIV cycles
// (the first step in the first cycle after reset), that
// Clock = (A and B) or (C and D) at every cycle, that tick pulses once per
// rising edge of Clock, 8*DIV cycles apart, and that run = 0 freezes it.
module tb_clock_gen;
  localparam int DIV = 2;
  logic clk = 0, rst, run, clock, tick;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  clock_gen #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [3:0] seq [8] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111, 4'b0111, 4'b0011, 4'b0001};
    int idx, last_tick, ticks;
    logic prev_clock;
    rst = 1; run = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0; run = 1;
    idx = 0; last_tick = -1; ticks = 0; prev_clock = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // phase pattern advances every DIV cycles
      checks++;
      if (ph !== seq[((cyc + DIV - 1) / DIV) % 8]) begin
        failures++; if (failures < 10) $display("FAIL cyc %0d ph=%b exp=%b", cyc, ph, seq[((cyc + DIV - 1) / DIV) % 8]);
      end
      checks++;
      if (clock !== ((ph[3] & ph[2]) | (ph[1] & ph[0]))) failures++;
      checks++;
      if (tick !== (clock & ~prev_clock)) begin failures++; $display("FAIL tick at %0d", cyc); end
      if (tick) begin
        if (last_tick >= 0 && (cyc - last_tick) != 8 * DIV) begin
          failures++; $display("FAIL tick spacing %0d", cyc - last_tick);
        end
        last_tick = cyc; ticks++;
      end
      prev_clock = clock;
      @(posedge clk); #1;
    end
    checks++;
    if (ticks != 400 / (8 * DIV)) begin failures++; $display("FAIL ticks=%0d", ticks); end
    // run = 0 freezes the ring
    run = 0;
    begin
      logic [3:0] held;
      held = ph;
      repeat (20) begin
        @(posedge clk); #1;
        checks++;
        if (ph !== held || tick) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
