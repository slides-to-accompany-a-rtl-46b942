// not_gate: the relay NOT circuit.
//
// A relay whose coil is driven by the input and whose normally-closed
// contact connects +12 V to the output: the output carries +12 V ("1")
// exactly when the coil is not energised. Logic level 1 is +12 V and 0 is
// an unconnected wire, as in the original relay machine. Purely
// combinational; the truth table is the one published for the circuit.
module not_gate (
  input  logic in_b,
  output logic out_b
);
  assign out_b = ~in_b;
endmodule
