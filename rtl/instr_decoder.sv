// instr_decoder: instruction decoding for the relay computer.
//
// Splits the 8-bit instruction register into an instruction class and its
// fields (see relay_pkg::dec_t). Formats:
//   00dddsss  MOV8   ddd <- sss (A,B,C,D,M1,M2,X,Y = 0..7)
//   01rddddd  SETAB  A (r=0) or B (r=1) <- ddddd sign-extended (-16..15)
//   1000rfff  ALU    A (r=0) or D (r=1) <- fff(B, C), sets S, Cy, Z
//   100100rr  LOAD   A,B,C,D <- [M]
//   100110rr  STORE  [M] <- A,B,C,D
//   1010dss0  MOV16  PC (d=0) or XY (d=1) <- M (00), XY (01), J (10)
//   10101110  HALT
//   10110000  INC16  XY <- XY + 1
//   11000000  LDI16  M <- next two bytes (high byte first)
//   111nczgl  BRANCH J <- next two bytes; if (n&S)|(c&Cy)|(z&Z)|(g&!Z)
//                    then PC <- J; if l, XY <- return address first
// The class codes, the register numbering and the bit-field reading of the
// branch group agree with every published encoding (GOTO 11100110, CALL
// 11100111, BNEG 11110000, BCY 11101000, BZ 11100100, BNZ 11100010); the
// field numbering of MOV16 and the treatment of undefined codes as no
// operation are this design's choices. Combinational.
module instr_decoder
  import relay_pkg::*;
(
  input  logic [7:0] ir,
  output dec_t       dec
);
  always_comb begin
    dec         = '0;
    dec.cls     = I_NOP;
    dec.dst8    = reg8_e'(ir[5:3]);
    dec.src8    = reg8_e'(ir[2:0]);
    dec.fn      = alu_fn_e'(ir[2:0]);
    dec.imm8    = {{3{ir[4]}}, ir[4:0]};
    dec.d16_xy  = ir[3];
    dec.s16     = ir[2:1];
    dec.br_s    = ir[4];
    dec.br_cy   = ir[3];
    dec.br_z    = ir[2];
    dec.br_nz   = ir[1];
    dec.br_link = ir[0];
    casez (ir)
      8'b00??????: dec.cls = I_MOV8;
      8'b01??????: begin
        dec.cls  = I_SETAB;
        dec.dst8 = ir[5] ? R_B : R_A;
      end
      8'b1000????: begin
        dec.cls  = I_ALU;
        dec.dst8 = ir[3] ? R_D : R_A;
      end
      8'b100100??: begin
        dec.cls  = I_LOAD;
        dec.dst8 = reg8_e'({1'b0, ir[1:0]});
      end
      8'b100110??: begin
        dec.cls  = I_STORE;
        dec.src8 = reg8_e'({1'b0, ir[1:0]});
      end
      8'b1010???0: begin
        if (ir[2:1] != 2'b11) dec.cls = I_MOV16;
        else if (ir[3])       dec.cls = I_HALT;   // 10101110
        else                  dec.cls = I_NOP;
      end
      8'b10110000: dec.cls = I_INC16;
      8'b11000000: dec.cls = I_LDI16;
      8'b111?????: dec.cls = I_BRANCH;
      default:     dec.cls = I_NOP;
    endcase
  end
endmodule
