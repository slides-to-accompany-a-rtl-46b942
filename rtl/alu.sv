// alu: the 8-bit arithmetic logic unit.
//
// Operands are always registers B and C. The 3-bit function code fff picks
// one of: 000 add (B+C), 001 inc (B+1), 010 and, 011 or, 100 xor, 101 not
// (of B), 110 shl (B rotated left by one), 111 nop (result 0). The function
// code goes through the 3-to-8 decoder; each decoder line enables one
// unit's output through an enable circuit and the enabled outputs are
// wired together, as in the relay machine. For inc the adder is reused with
// C gated off and a carry in of 1 (this design's choice). The condition
// outputs are s = result bit 7, z = result is zero (zero-detect circuit)
// and cy = the adder's carry for add and inc, 0 otherwise (carry for the
// logic functions is this design's choice). Combinational.
module alu
  import relay_pkg::*;
(
  input  logic [7:0] b,
  input  logic [7:0] c,
  input  alu_fn_e    fn,
  output logic [7:0] result,
  output logic       s,
  output logic       cy,
  output logic       z
);
  logic [7:0] sel;
  logic [7:0] l_not, l_and, l_or, l_xor, sum, rot, c_in;
  logic       carry;

  decoder3to8 u_dec (.f(fn), .y(sel));

  // adder: C is disconnected and carry in is set for inc
  bus_enable #(.W(8)) u_cgate (.en(~sel[FN_INC]), .d(c), .q(c_in));
  adder8 #(.W(8)) u_add (.b(b), .c(c_in), .cy_in(sel[FN_INC]), .sum(sum), .carry(carry));
  logic8 #(.W(8)) u_logic (.b(b), .c(c), .o_not(l_not), .o_and(l_and), .o_or(l_or), .o_xor(l_xor));
  shl8   #(.W(8)) u_shl (.b(b), .q(rot));

  // output selection: one enable circuit per unit, outputs wired together
  bus_or #(.W(8), .N(7)) u_out (
    .en ({sel[FN_SHL], sel[FN_NOT], sel[FN_XOR], sel[FN_OR], sel[FN_AND],
          sel[FN_INC], sel[FN_ADD]}),
    .src({rot, l_not, l_xor, l_or, l_and, sum, sum}),
    .q  (result)
  );

  assign s  = result[7];
  assign cy = carry & (sel[FN_ADD] | sel[FN_INC]);
  zero_detect #(.W(8)) u_zero (.d(result), .z(z));
endmodule
