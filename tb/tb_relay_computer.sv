// tb_relay_computer: end-to-end test of the relay computer at its default
// size (32K byte RAM, one clk cycle per relay-clock phase).
//
// The testbench holds its own instruction-set model of the machine and runs
// it in lock step with the design: each time the design finishes an
// instruction, the model executes one instruction and all registers, PC,
// J and the condition bits are compared, together with the number of
// sequencer steps the instruction took (3, 4, 6 or 8 by class). At the end
// of each program the whole RAM is compared.
//
// Programs:
//  1. the published example program (8-bit shift-and-add multiply of B by
//     C into X), placed at address 0010h behind a short prologue that loads
//     B and C from memory, for several operand pairs; when the true product
//     is below 256 the result must equal B*C;
//  2. random programs: the whole RAM filled with random bytes, run until
//     HALT or a fixed number of instructions.
// Each mechanism (every instruction class, branches taken and not taken,
// call, the self-move clear, the carry / zero / sign bits, a carry across
// the byte boundary of XY+1, memory writes) is counted, and one that never
// happened counts as a failure.
module tb_relay_computer;
  import relay_pkg::*;

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

  relay_computer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference model
  logic [7:0]  m_r [8];
  logic [15:0] m_pc, m_j;
  logic        m_s, m_cy, m_z, m_halt;
  logic [7:0]  m_mem [32768];

  // mechanism counters
  int n_cls [11];
  int n_taken, n_not_taken, n_call, n_selfclr, n_cy, n_zero, n_sign, n_inc_carry, n_store;

  function automatic int class_steps(iclass_e c);
    case (c)
      I_MOV8, I_MOV16, I_INC16: return 4;
      I_LDI16:                  return 6;
      I_BRANCH:                 return 8;
      default:                  return 3;
    endcase
  endfunction

  function automatic logic [7:0] rd(logic [15:0] a);
    return m_mem[a[14:0]];
  endfunction

  // executes one instruction; returns its class
  function automatic iclass_e model_step();
    logic [7:0] ir;
    iclass_e c;
    int d, s;
    ir = rd(m_pc);
    m_pc++;
    d = int'(ir[5:3]); s = int'(ir[2:0]);
    if (ir[7:6] == 2'b00) begin
      c = I_MOV8;
      if (d == s) begin
        if (m_r[d] != 0) n_selfclr++;
        m_r[d] = 0;
      end else m_r[d] = m_r[s];
    end else if (ir[7:6] == 2'b01) begin
      c = I_SETAB;
      m_r[ir[5] ? 1 : 0] = {{3{ir[4]}}, ir[4:0]};
    end else if (ir[7:4] == 4'b1000) begin
      int b, cc, r, k;
      c = I_ALU;
      b = int'(m_r[1]); cc = int'(m_r[2]); k = 0;
      case (ir[2:0])
        3'd0: begin r = b + cc; k = r / 256; r = r % 256; end
        3'd1: begin r = b + 1;  k = r / 256; r = r % 256; end
        3'd2: r = int'(m_r[1] & m_r[2]);
        3'd3: r = int'(m_r[1] | m_r[2]);
        3'd4: r = int'(m_r[1] ^ m_r[2]);
        3'd5: r = 255 - b;
        3'd6: r = (2 * b) % 256 + b / 128;
        default: r = 0;
      endcase
      m_r[ir[3] ? 3 : 0] = 8'(r);
      m_s = (r >= 128); m_cy = 1'(k); m_z = (r == 0);
      if (m_cy) n_cy++;
      if (m_z) n_zero++;
      if (m_s) n_sign++;
    end else if (ir[7:2] == 6'b100100) begin
      c = I_LOAD;
      m_r[ir[1:0]] = rd({m_r[4], m_r[5]});
    end else if (ir[7:2] == 6'b100110) begin
      logic [15:0] a;
      c = I_STORE;
      a = {m_r[4], m_r[5]};
      m_mem[a[14:0]] = m_r[ir[1:0]];
      n_store++;
    end else if (ir == 8'b10101110) begin
      c = I_HALT;
      m_halt = 1;
    end else if (ir[7:4] == 4'b1010 && ir[0] == 0 && ir[2:1] != 2'b11) begin
      logic [15:0] v;
      c = I_MOV16;
      if (ir[3] && ir[2:1] == 2'b01) v = 0;   // XY cleared before it is read
      else if (ir[2:1] == 2'b00) v = {m_r[4], m_r[5]};
      else if (ir[2:1] == 2'b01) v = {m_r[6], m_r[7]};
      else v = m_j;
      if (ir[3]) {m_r[6], m_r[7]} = v;
      else m_pc = v;
    end else if (ir == 8'b10110000) begin
      c = I_INC16;
      if (m_r[7] == 8'hFF) n_inc_carry++;
      {m_r[6], m_r[7]} = {m_r[6], m_r[7]} + 16'd1;
    end else if (ir == 8'b11000000) begin
      c = I_LDI16;
      m_r[4] = rd(m_pc); m_pc++;
      m_r[5] = rd(m_pc); m_pc++;
    end else if (ir[7:5] == 3'b111) begin
      logic t;
      c = I_BRANCH;
      m_j[15:8] = rd(m_pc); m_pc++;
      m_j[7:0]  = rd(m_pc); m_pc++;
      if (ir[0]) begin {m_r[6], m_r[7]} = m_pc; n_call++; end
      t = (ir[4] & m_s) | (ir[3] & m_cy) | (ir[2] & m_z) | (ir[1] & ~m_z);
      if (t) begin m_pc = m_j; n_taken++; end else n_not_taken++;
    end else begin
      c = I_NOP;
    end
    n_cls[c]++;
    return c;
  endfunction

  // ------------------------------------------------------------ helpers
  task automatic compare_state(input string where);
    checks++;
    if (dbg_regs != m_r || dbg_pc !== m_pc || dbg_flags !== {m_s, m_cy, m_z} || dbg_j !== m_j) begin
      failures++;
      if (failures < 10) begin
        $display("FAIL %s: pc=%h/%h j=%h/%h flags=%b/%b", where, dbg_pc, m_pc, dbg_j, m_j,
                 dbg_flags, {m_s, m_cy, m_z});
        for (int k = 0; k < 8; k++) $display("   r%0d %h/%h", k, dbg_regs[k], m_r[k]);
      end
    end
  endtask

  // reset the machine and load m_mem into its RAM; the model restarts too
  task automatic load_and_reset();
    rst = 1; run = 0; ld_we = 0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 32768; a++) begin
      ld_we = 1; ld_addr = 16'(a); ld_data = m_mem[a];
      @(posedge clk);
    end
    ld_we = 0;
    @(posedge clk);
    foreach (m_r[k]) m_r[k] = 0;
    m_pc = 0; m_j = 0; m_s = 0; m_cy = 0; m_z = 0; m_halt = 0;
    #1;
    rst = 0; run = 1;
  endtask

  // run in lock step until HALT or max_instr instructions
  task automatic run_program(input string name, input int max_instr);
    int ticks, n;
    bit stop;
    logic [31:0] count_seen;
    ticks = 0; n = 0; stop = 0; count_seen = 0;
    while (!stop) begin
      @(posedge clk); #1;
      if (step_tick) ticks++;
      if (halted) begin
        iclass_e c;
        c = model_step();
        checks++;
        if (c != I_HALT) begin failures++; $display("FAIL %s: design halted, model ran class %0d", name, c); end
        compare_state({name, " halt"});
        stop = 1;
      end else if (instr_count != count_seen) begin
        iclass_e c;
        count_seen = instr_count;
        c = model_step();
        checks++;
        if (ticks != class_steps(c)) begin
          failures++;
          if (failures < 10) $display("FAIL %s: class %0d took %0d steps, expected %0d", name, c, ticks, class_steps(c));
        end
        ticks = 0;
        compare_state(name);
        n++;
        if (n >= max_instr) stop = 1;
      end
    end
  endtask

  // hold the machine in reset and read the whole RAM back through the
  // loader port
  task automatic check_memory(input string name);
    rst = 1; run = 0; ld_we = 0;
    @(posedge clk); #1;
    checks++;
    for (int a = 0; a < 32768; a++) begin
      ld_addr = 16'(a); #1;
      if (ld_rdata !== m_mem[a]) begin
        failures++;
        $display("FAIL %s: mem[%h]=%h expected %h", name, a, ld_rdata, m_mem[a]);
        break;
      end
    end
  endtask

  // the example program: multiply B by C into X (listing addresses 00..1C)
  localparam int PROG_AT = 16'h0010;
  localparam logic [7:0] EXAMPLE [29] = '{
    8'h39, 8'h36, 8'h85, 8'hF0, 8'h00, 8'h07, 8'h32, 8'h59,
    8'h18, 8'h0E, 8'h86, 8'h30, 8'h0F, 8'h86, 8'h38, 8'h0F,
    8'h85, 8'hF0, 8'h00, 8'h17, 8'h0E, 8'h80, 8'h30, 8'h0B,
    8'h89, 8'hE2, 8'h00, 8'h09, 8'hAE};

  task automatic example_run(input logic [7:0] b, input logic [7:0] c);
    int p;
    longint t0;
    foreach (m_mem[a]) m_mem[a] = 8'($urandom);
    // prologue: M <- 0200h; C <- [M]; M <- 0201h; B <- [M]; goto 0010h
    p = 0;
    m_mem[p++] = 8'hC0; m_mem[p++] = 8'h02; m_mem[p++] = 8'h00;
    m_mem[p++] = 8'h92;
    m_mem[p++] = 8'hC0; m_mem[p++] = 8'h02; m_mem[p++] = 8'h01;
    m_mem[p++] = 8'h91;
    m_mem[p++] = 8'hE6; m_mem[p++] = 8'h00; m_mem[p++] = 8'(PROG_AT);
    for (int i = 0; i < 29; i++) m_mem[PROG_AT + i] = EXAMPLE[i];
    // branch targets move with the program
    m_mem[PROG_AT + 5]  = EXAMPLE[5]  + 8'(PROG_AT);
    m_mem[PROG_AT + 19] = EXAMPLE[19] + 8'(PROG_AT);
    m_mem[PROG_AT + 27] = EXAMPLE[27] + 8'(PROG_AT);
    m_mem[16'h0200] = c;
    m_mem[16'h0201] = b;
    load_and_reset();
    t0 = cycles;
    run_program($sformatf("multiply %0d*%0d", b, c), 1000);
    $display("multiply %0d*%0d: X=%0d after %0d instructions, %0d clk cycles",
             b, c, dbg_regs[R_X], instr_count + 1, cycles - t0);
    checks++;
    if (!halted) begin failures++; $display("FAIL multiply did not halt"); end
    if (int'(b) * int'(c) < 256) begin
      checks++;
      if (dbg_regs[R_X] !== 8'(int'(b) * int'(c))) begin
        failures++; $display("FAIL multiply %0d*%0d gave %0d", b, c, dbg_regs[R_X]);
      end
    end
    check_memory("multiply");
  endtask

  initial begin
    foreach (n_cls[k]) n_cls[k] = 0;
    {n_taken, n_not_taken, n_call, n_selfclr, n_cy, n_zero, n_sign, n_inc_carry, n_store} = '0;

    example_run(8'd13, 8'd11);
    example_run(8'd7, 8'd9);
    example_run(8'd0, 8'd200);
    example_run(8'd255, 8'd1);
    example_run(8'd200, 8'd250);
    example_run(8'($urandom), 8'($urandom));

    example_run(8'd3, 8'd5);

    for (int p = 0; p < 64; p++) begin
      foreach (m_mem[a]) m_mem[a] = 8'($urandom);
      // keep the first instruction from halting at once
      if (m_mem[0] == 8'hAE) m_mem[0] = 8'h00;
      load_and_reset();
      run_program($sformatf("random %0d", p), 600);
      check_memory($sformatf("random %0d", p));
    end

    // mechanisms
    begin
      string names [11] = '{"NOP", "MOV8", "SETAB", "ALU", "LOAD", "STORE", "MOV16", "HALT", "INC16", "LDI16", "BRANCH"};
      for (int k = 1; k < 11; k++) begin
        checks++;
        if (n_cls[k] == 0) begin failures++; $display("FAIL never executed %s", names[k]); end
        $display("executed %-6s %0d", names[k], n_cls[k]);
      end
    end
    checks++; if (n_taken == 0)     begin failures++; $display("FAIL no branch taken"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("FAIL no branch not taken"); end
    checks++; if (n_call == 0)      begin failures++; $display("FAIL no call"); end
    checks++; if (n_selfclr == 0)   begin failures++; $display("FAIL no self-move clear"); end
    checks++; if (n_cy == 0)        begin failures++; $display("FAIL carry never set"); end
    checks++; if (n_zero == 0)      begin failures++; $display("FAIL zero never set"); end
    checks++; if (n_sign == 0)      begin failures++; $display("FAIL sign never set"); end
    checks++; if (n_inc_carry == 0) begin failures++; $display("FAIL XY+1 never carried into X"); end
    checks++; if (n_store == 0)     begin failures++; $display("FAIL no store"); end
    $display("taken %0d, not taken %0d, call %0d, self-clear %0d, carry %0d, zero %0d, sign %0d, inc carry %0d, store %0d",
             n_taken, n_not_taken, n_call, n_selfclr, n_cy, n_zero, n_sign, n_inc_carry, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
