// zero_detect: asserts z when every bit of d is 0.
//
// In the relay machine a chain of normally-closed contacts passes +12 V
// only if no bit relay is energised; here that is the NOR of all bits. It
// feeds the Z condition bit tested by the branch-if-zero and
// branch-if-not-zero instructions. Combinational.
module zero_detect #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  output logic         z
);
  assign z = ~(|d);
endmodule
