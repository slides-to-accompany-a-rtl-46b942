// relay_pkg: types and constants shared by the relay computer.
//
// The machine has eight 8-bit registers that share the 8-bit data bus
// (A, B, C, D, M1, M2, X, Y, numbered 0..7 in that order inside MOV
// instructions), 16-bit registers PC, Inc and J on the 16-bit address bus,
// and three condition bits S (sign), Cy (carry) and Z (zero). The ALU
// function codes and the instruction formats follow the published
// instruction set; the numbering of the 16-bit move fields and the grouping
// of the control signals into a struct are this design's choices.
package relay_pkg;

  // ALU function codes (fff)
  typedef enum logic [2:0] {
    FN_ADD = 3'b000,
    FN_INC = 3'b001,
    FN_AND = 3'b010,
    FN_OR  = 3'b011,
    FN_XOR = 3'b100,
    FN_NOT = 3'b101,
    FN_SHL = 3'b110,
    FN_NOP = 3'b111
  } alu_fn_e;

  // 8-bit register numbers used by ddd / sss
  typedef enum logic [2:0] {
    R_A = 3'd0, R_B = 3'd1, R_C = 3'd2, R_D = 3'd3,
    R_M1 = 3'd4, R_M2 = 3'd5, R_X = 3'd6, R_Y = 3'd7
  } reg8_e;

  // Instruction classes
  typedef enum logic [3:0] {
    I_NOP,    // any code the instruction set does not define
    I_MOV8,   // 00dddsss
    I_SETAB,  // 01rddddd
    I_ALU,    // 1000rfff
    I_LOAD,   // 100100rr
    I_STORE,  // 100110rr
    I_MOV16,  // 1010dss0 (ss != 11)
    I_HALT,   // 10101110
    I_INC16,  // 10110000
    I_LDI16,  // 11000000 hi lo
    I_BRANCH  // 111nczgl hi lo
  } iclass_e;

  // Decoded instruction
  typedef struct packed {
    iclass_e     cls;
    reg8_e       dst8;     // destination of MOV8/SETAB/ALU/LOAD
    reg8_e       src8;     // source of MOV8/STORE
    alu_fn_e     fn;
    logic [7:0]  imm8;     // sign-extended 5-bit immediate of SETAB
    logic        d16_xy;   // MOV16 destination: 0 = PC, 1 = XY
    logic [1:0]  s16;      // MOV16 source: 00 M, 01 XY, 10 J
    logic        br_s, br_cy, br_z, br_nz, br_link;
  } dec_t;

  // Address-bus sources
  typedef enum logic [2:0] {
    AB_NONE, AB_PC, AB_INC, AB_M, AB_XY, AB_J
  } abus_src_e;

  // Control signals for one sequencer step
  typedef struct packed {
    logic [7:0] clr8;       // clear 8-bit register k at the strobe
    logic [7:0] ld8;        // load 8-bit register k from the data bus
    logic [7:0] sel8;       // 8-bit register k drives the data bus
    logic       sel_alu;    // ALU result drives the data bus
    logic       sel_imm;    // SETAB immediate drives the data bus
    logic       mem_read;   // RAM drives the data bus
    logic       mem_write;  // data bus written to RAM
    abus_src_e  abus;       // who drives the address bus
    logic       ld_inst;
    logic       ld_inc;     // Inc <- address bus + 1
    logic       ld_pc;      // PC <- address bus
    logic       ld_xy;      // X,Y <- address bus
    logic       ld_j1, ld_j2;
    logic       ld_cond;    // S, Cy, Z <- ALU
    logic       halt;
  } ctl_t;

endpackage
