// rev_not_gate: the 1x1 reversible NOT gate.
//
// The simplest reversible gate: one input, one output, P = A'. It is its own inverse
// and has a quantum cost of zero. Purely combinational, no clock; the output follows
// the input after one gate delay. The mapping is the one the design gives; there is
// nothing in it to choose.
module rev_not_gate (
  input  logic a,
  output logic p
);

  assign p = ~a;

endmodule
