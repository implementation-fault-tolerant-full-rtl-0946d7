// feynman_gate: the 2x2 Feynman (controlled NOT) gate.
//
// Maps (A, B) to (P, Q) with P = A and Q = A xor B: B is inverted when the control
// A is 1. With B tied to 0 the gate copies A; with B tied to 1 it gives A'. It is its
// own inverse and has a quantum cost of one. Purely combinational, no clock. The
// equations are the ones the design gives; nothing here is a local choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
