// tb_relay_computer_slow: runs the sample multiply program (13 * 11 into X)
// on a relay computer whose clock phases last CLK_DIV = 3 clk cycles.
// Checks that every step strobe is exactly 8 * CLK_DIV = 24 cycles after
// the previous one, that the program halts with X = 143, and that the run
// takes the same number of instructions as at full speed (105, counting
// the 5-instruction prologue that loads B and C from memory).
module tb_relay_computer_slow;
  localparam int DIV = 3;
  logic        clk = 0, rst, run, ld_we;
  logic [15:0] ld_addr;
  logic [7:0]  ld_data, ld_rdata;
  logic        halted, step_tick, dbg_clock, dbg_cond;
  logic [7:0]  dbg_regs [8];
  logic [15:0] dbg_pc, dbg_j;
  logic [7:0]  dbg_inst, step_state;
  logic [2:0]  dbg_flags;
  logic [3:0]  dbg_phases;
  logic [31:0] instr_count;
  int checks = 0, failures = 0;

  relay_computer #(.CLK_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // prologue (M <- 0200h, C <- [M], M <- 0201h, B <- [M], goto 0010h) and
  // the multiply program at 0010h with its branch targets moved by 10h
  localparam logic [7:0] PROLOGUE [11] = '{8'hC0, 8'h02, 8'h00, 8'h92, 8'hC0, 8'h02, 8'h01,
                                           8'h91, 8'hE6, 8'h00, 8'h10};
  localparam logic [7:0] PROG [29] = '{
    8'h39, 8'h36, 8'h85, 8'hF0, 8'h00, 8'h17, 8'h32, 8'h59,
    8'h18, 8'h0E, 8'h86, 8'h30, 8'h0F, 8'h86, 8'h38, 8'h0F,
    8'h85, 8'hF0, 8'h00, 8'h27, 8'h0E, 8'h80, 8'h30, 8'h0B,
    8'h89, 8'hE2, 8'h00, 8'h19, 8'hAE};

  task automatic poke(input int a, input logic [7:0] v);
    ld_we = 1; ld_addr = 16'(a); ld_data = v;
    @(posedge clk);
    ld_we = 0;
  endtask

  initial begin
    int last_tick, cyc, ticks;
    rst = 1; run = 0; ld_we = 0; ld_addr = 0; ld_data = 0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 1024; a++) poke(a, 8'h00);
    for (int i = 0; i < 11; i++) poke(i, PROLOGUE[i]);
    for (int i = 0; i < 29; i++) poke(16 + i, PROG[i]);
    poke(16'h0200, 8'd11);
    poke(16'h0201, 8'd13);
    #1;
    rst = 0; run = 1;
    last_tick = -1; cyc = 0; ticks = 0;
    while (!halted) begin
      @(posedge clk); #1;
      cyc++;
      if (step_tick) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 8 * DIV) begin
            failures++; $display("FAIL step spacing %0d", cyc - last_tick);
          end
        end
        last_tick = cyc; ticks++;
      end
    end
    checks++;
    if (dbg_regs[6] !== 8'd143) begin failures++; $display("FAIL X=%0d", dbg_regs[6]); end
    checks++;
    if (instr_count + 1 != 105) begin failures++; $display("FAIL %0d instructions", instr_count + 1); end
    $display("13*11 = %0d in %0d instructions, %0d steps, %0d clk cycles", dbg_regs[6], instr_count + 1, ticks, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
