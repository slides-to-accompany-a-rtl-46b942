// relay_computer: the complete 8-bit relay computer.
//
// Datapath. Eight 8-bit registers A, B, C, D, M1, M2, X, Y sit on the 8-bit
// data bus; M1:M2 form the 16-bit memory address M and X:Y the 16-bit
// register XY. The 16-bit address bus is driven by one of PC, Inc, M, XY
// or J (J1:J2, the jump-target register filled from the two address bytes
// of a branch). The incrementer adds 1 to the address bus into Inc, which
// advances PC and implements XY <- XY + 1. The ALU always works on B and C
// and its result can be written to A or D; ALU instructions also store its
// sign, carry and zero outputs in the condition register (S, Cy, Z) that
// the conditional branches test. The 32K byte RAM is addressed by address
// bus bits [14:0]; Mem Read puts its output on the data bus, Mem Write
// stores the data bus. Every bus is the OR of the sources enabled onto it.
//
// Control. clock_gen produces the four relay phases and the machine Clock
// = (A and B) or (C and D); each rising edge of Clock is one step (tick).
// The sequencer walks a one-hot chain of eight steps, the instruction
// decoder classifies the instruction register and the control unit turns
// (step, instruction, condition bits) into the enables and loads of that
// step; all register loads happen on the tick that ends the step. An
// instruction takes 3 to 8 steps (8*CLK_DIV clk cycles per step).
//
// Interface. rst is synchronous and clears every register, the flags and
// the sequencer; while rst is 1 the RAM can be written through
// ld_we/ld_addr/ld_data and read back on ld_rdata (this loader port is this
// design's addition).
// With run = 1 the machine fetches from address 0 until it executes HALT,
// which sets halted. The dbg outputs show the registers (the front panel
// lamps). The RAM is 32K bytes, so bit 15 of ld_addr and of the address bus
// does not select memory.
module relay_computer
  import relay_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 1,
  parameter int unsigned MEM_BYTES = 32768
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [7:0]  ld_data,
  output logic [7:0]  ld_rdata,       // RAM byte at ld_addr while rst is 1
  output logic        halted,
  output logic [7:0]  dbg_regs [8],   // A, B, C, D, M1, M2, X, Y
  output logic [15:0] dbg_pc,
  output logic [15:0] dbg_j,
  output logic [7:0]  dbg_inst,
  output logic [2:0]  dbg_flags,      // {S, Cy, Z}
  output logic        dbg_cond,       // branch condition of the current instruction
  output logic [3:0]  dbg_phases,     // relay clock phases {A, B, C, D}
  output logic        dbg_clock,      // machine Clock
  output logic [31:0] instr_count,
  output logic        step_tick,
  output logic [7:0]  step_state
);
  localparam int unsigned AW = $clog2(MEM_BYTES);

  // ---------------------------------------------------------------- clock
  logic [3:0] phases;
  logic       mclock, tick;
  clock_gen #(.DIV(CLK_DIV)) u_clk (
    .clk(clk), .rst(rst), .run(run), .ph(phases), .clock(mclock), .tick(tick)
  );

  // ---------------------------------------------------------------- control
  logic [7:0] state;
  logic       last, done, taken;
  logic [7:0] inst;
  dec_t       dec;
  ctl_t       ctl;
  logic [2:0] flags;    // {S, Cy, Z}

  sequencer #(.STEPS(8)) u_seq (
    .clk(clk), .rst(rst), .tick(tick), .last(last), .halt(ctl.halt),
    .state(state), .done(done), .halted(halted)
  );
  instr_decoder u_dec (.ir(inst), .dec(dec));
  control u_ctl (
    .state(state), .dec(dec), .s(flags[2]), .cy(flags[1]), .z(flags[0]),
    .ctl(ctl), .last(last), .taken(taken)
  );

  // ---------------------------------------------------------------- buses
  logic [7:0]  dbus;
  logic [15:0] abus;
  logic [7:0]  r8 [8];
  logic [15:0] pc, inc, j;
  logic [7:0]  alu_y, mem_rd;
  logic        alu_s, alu_cy, alu_z;

  bus_or #(.W(8), .N(11)) u_dbus (
    .en ({ctl.mem_read, ctl.sel_imm, ctl.sel_alu, ctl.sel8}),
    .src({mem_rd, dec.imm8, alu_y,
          r8[7], r8[6], r8[5], r8[4], r8[3], r8[2], r8[1], r8[0]}),
    .q  (dbus)
  );

  bus_or #(.W(16), .N(5)) u_abus (
    .en ({ctl.abus == AB_J, ctl.abus == AB_XY, ctl.abus == AB_M,
          ctl.abus == AB_INC, ctl.abus == AB_PC}),
    .src({j, {r8[R_X], r8[R_Y]}, {r8[R_M1], r8[R_M2]}, inc, pc}),
    .q  (abus)
  );

  // ---------------------------------------------------------------- registers
  for (genvar k = 0; k < 8; k++) begin : g_r8
    logic       ld16;
    logic [7:0] d16;
    // X and Y (and only they) can also load from the address bus
    if (k == R_X) begin : g_x
      assign ld16 = ctl.ld_xy;
      assign d16  = abus[15:8];
    end else if (k == R_Y) begin : g_y
      assign ld16 = ctl.ld_xy;
      assign d16  = abus[7:0];
    end else begin : g_other
      assign ld16 = 1'b0;
      assign d16  = '0;
    end
    relay_reg #(.W(8)) u_r (
      .clk(clk), .rst(rst), .strobe(tick),
      .clr(ctl.clr8[k]), .ld(ctl.ld8[k] | ld16),
      .d((ctl.ld8[k] ? dbus : 8'h00) | (ld16 ? d16 : 8'h00)),
      .q(r8[k])
    );
  end

  relay_reg #(.W(8)) u_inst (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_inst), .ld(ctl.ld_inst), .d(dbus), .q(inst)
  );
  relay_reg #(.W(16)) u_pc (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_pc), .ld(ctl.ld_pc), .d(abus), .q(pc)
  );
  logic [15:0] inc_d;
  inc16 #(.W(16)) u_incr (.a(abus), .q(inc_d));
  relay_reg #(.W(16)) u_inc (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_inc), .ld(ctl.ld_inc), .d(inc_d), .q(inc)
  );
  relay_reg #(.W(8)) u_j1 (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_j1), .ld(ctl.ld_j1), .d(dbus), .q(j[15:8])
  );
  relay_reg #(.W(8)) u_j2 (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_j2), .ld(ctl.ld_j2), .d(dbus), .q(j[7:0])
  );

  // ---------------------------------------------------------------- ALU and flags
  alu u_alu (
    .b(r8[R_B]), .c(r8[R_C]), .fn(dec.fn),
    .result(alu_y), .s(alu_s), .cy(alu_cy), .z(alu_z)
  );
  relay_reg #(.W(3)) u_flags (
    .clk(clk), .rst(rst), .strobe(tick), .clr(ctl.ld_cond), .ld(ctl.ld_cond),
    .d({alu_s, alu_cy, alu_z}), .q(flags)
  );

  // ---------------------------------------------------------------- memory
  logic [AW-1:0] mem_addr;
  assign mem_addr = rst ? ld_addr[AW-1:0] : abus[AW-1:0];
  sram #(.BYTES(MEM_BYTES)) u_mem (
    .clk  (clk),
    .addr (mem_addr),
    .we   (ld_we | (tick & ctl.mem_write)),
    .wdata(ld_we ? ld_data : dbus),
    .rdata(mem_rd)
  );

  // ---------------------------------------------------------------- observation
  always_ff @(posedge clk) begin
    if (rst)       instr_count <= '0;
    else if (done) instr_count <= instr_count + 1;
  end

  assign ld_rdata   = mem_rd;
  assign dbg_regs   = r8;
  assign dbg_pc     = pc;
  assign dbg_j      = j;
  assign dbg_inst   = inst;
  assign dbg_flags  = flags;
  assign dbg_cond   = taken;
  assign step_tick  = tick;
  assign dbg_phases = phases;
  assign dbg_clock  = mclock;
  assign step_state = state;

  // at most one source on each bus
  a_dbus_one: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctl.mem_read, ctl.sel_imm, ctl.sel_alu, ctl.sel8}));
  // the loader is only used while the machine is held in reset
  a_loader: assert property (@(posedge clk) ld_we |-> rst);
endmodule
