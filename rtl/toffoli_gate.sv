// toffoli_gate: the 3x3 Toffoli (controlled controlled NOT) gate.
//
// Maps (A, B, C) to P = A, Q = B, R = AB xor C: the target C is inverted when both
// controls are 1. With C = 0 it gives AND, with C = 1 NAND, which makes it universal
// for reversible logic. It is its own inverse. Purely combinational, no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;

endmodule
