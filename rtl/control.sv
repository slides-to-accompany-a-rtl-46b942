// control: turns the sequencer step and the decoded instruction into the
// bus enables, register clear/load signals and memory strobes of one step.
//
// Every instruction starts with two fetch steps:
//   F1  address bus <- PC, Mem Read, Inst <- data bus, Inc <- address bus + 1
//   F2  address bus <- Inc, PC <- address bus
// and then, per class (E1, E2, ... are state[2], state[3], ...):
//   MOV8   E1 clear ddd;  E2 sss drives data bus, ddd loads
//   SETAB  E1 immediate drives data bus, A/B replaced
//   ALU    E1 ALU drives data bus, A/D replaced, S/Cy/Z loaded
//   LOAD   E1 address bus <- M, Mem Read, A..D replaced
//   STORE  E1 address bus <- M, A..D drives data bus, Mem Write
//   INC16  E1 address bus <- XY, Inc loads;  E2 address bus <- Inc, XY replaced
//   MOV16  E1 clear destination (X,Y);  E2 source drives address bus, PC/XY loads
//   LDI16  E1..E4 read two bytes at PC into M1 then M2, advancing PC twice
//   BRANCH E1..E4 read two bytes at PC into J1 then J2, advancing PC twice;
//          E5 if link: XY <- PC (return address);  E6 if taken: PC <- J
//   HALT   E1 halt;   NOP  E1 nothing
// last is 1 in the final step of the instruction. Because a register is
// cleared in a step before it is loaded by MOV8 and MOV16, moving a register
// to itself clears it (the published example program writes X=0 this way).
// The step lists are this design's own; the published timing diagrams are
// not reproduced. Combinational.
module control
  import relay_pkg::*;
(
  input  logic [7:0]       state,
  input  dec_t             dec,
  input  logic             s,
  input  logic             cy,
  input  logic             z,
  output ctl_t             ctl,
  output logic             last,
  output logic             taken
);
  logic f1, f2, e1, e2, e3, e4, e5, e6;
  assign {e6, e5, e4, e3, e2, e1, f2, f1} = state;

  assign taken = (dec.br_s & s) | (dec.br_cy & cy) | (dec.br_z & z) | (dec.br_nz & ~z);

  always_comb begin
    ctl  = '0;
    ctl.abus = AB_NONE;
    last = 1'b0;
    if (f1) begin
      ctl.abus     = AB_PC;
      ctl.mem_read = 1'b1;
      ctl.ld_inst  = 1'b1;
      ctl.ld_inc   = 1'b1;
    end else if (f2) begin
      ctl.abus  = AB_INC;
      ctl.ld_pc = 1'b1;
    end else begin
      unique case (dec.cls)
        I_MOV8: begin
          if (e1) ctl.clr8[dec.dst8] = 1'b1;
          if (e2) begin
            ctl.sel8[dec.src8] = 1'b1;
            ctl.ld8[dec.dst8]  = 1'b1;
            last = 1'b1;
          end
        end
        I_SETAB: if (e1) begin
          ctl.sel_imm        = 1'b1;
          ctl.clr8[dec.dst8] = 1'b1;
          ctl.ld8[dec.dst8]  = 1'b1;
          last = 1'b1;
        end
        I_ALU: if (e1) begin
          ctl.sel_alu        = 1'b1;
          ctl.clr8[dec.dst8] = 1'b1;
          ctl.ld8[dec.dst8]  = 1'b1;
          ctl.ld_cond        = 1'b1;
          last = 1'b1;
        end
        I_LOAD: if (e1) begin
          ctl.abus           = AB_M;
          ctl.mem_read       = 1'b1;
          ctl.clr8[dec.dst8] = 1'b1;
          ctl.ld8[dec.dst8]  = 1'b1;
          last = 1'b1;
        end
        I_STORE: if (e1) begin
          ctl.abus           = AB_M;
          ctl.sel8[dec.src8] = 1'b1;
          ctl.mem_write      = 1'b1;
          last = 1'b1;
        end
        I_INC16: begin
          if (e1) begin
            ctl.abus   = AB_XY;
            ctl.ld_inc = 1'b1;
          end
          if (e2) begin
            ctl.abus     = AB_INC;
            ctl.clr8[R_X] = 1'b1;
            ctl.clr8[R_Y] = 1'b1;
            ctl.ld_xy    = 1'b1;
            last = 1'b1;
          end
        end
        I_MOV16: begin
          if (e1 && dec.d16_xy) begin
            ctl.clr8[R_X] = 1'b1;
            ctl.clr8[R_Y] = 1'b1;
          end
          if (e2) begin
            unique case (dec.s16)
              2'b00:   ctl.abus = AB_M;
              2'b01:   ctl.abus = AB_XY;
              default: ctl.abus = AB_J;
            endcase
            if (dec.d16_xy) ctl.ld_xy = 1'b1;
            else            ctl.ld_pc = 1'b1;
            last = 1'b1;
          end
        end
        I_LDI16, I_BRANCH: begin
          if (e1 || e3) begin
            ctl.abus     = AB_PC;
            ctl.mem_read = 1'b1;
            ctl.ld_inc   = 1'b1;
            if (dec.cls == I_LDI16) begin
              if (e1) begin ctl.clr8[R_M1] = 1'b1; ctl.ld8[R_M1] = 1'b1; end
              else    begin ctl.clr8[R_M2] = 1'b1; ctl.ld8[R_M2] = 1'b1; end
            end else begin
              ctl.ld_j1 = e1;
              ctl.ld_j2 = e3;
            end
          end
          if (e2 || e4) begin
            ctl.abus  = AB_INC;
            ctl.ld_pc = 1'b1;
            if (e4 && dec.cls == I_LDI16) last = 1'b1;
          end
          if (e5 && dec.br_link) begin
            ctl.abus      = AB_PC;
            ctl.clr8[R_X] = 1'b1;
            ctl.clr8[R_Y] = 1'b1;
            ctl.ld_xy     = 1'b1;
          end
          if (e6) begin
            if (taken) begin
              ctl.abus  = AB_J;
              ctl.ld_pc = 1'b1;
            end
            last = 1'b1;
          end
        end
        I_HALT: if (e1) begin
          ctl.halt = 1'b1;
          last = 1'b1;
        end
        default: if (e1) last = 1'b1;
      endcase
    end
  end
endmodule
