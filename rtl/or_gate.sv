// or_gate: the relay OR circuit.
//
// Two normally-open contacts, one per input, both feeding the same output
// wire: +12 V reaches the output if either relay is energised. An open
// contact leaves the wire unconnected, which counts as 0, so tying
// contacts together gives OR. Each instance has an output of its own:
// sharing one input contact between two OR outputs would connect those
// outputs to each other, which is the sneak path the original design warns
// about. Combinational.
module or_gate (
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = b | c;
endmodule
