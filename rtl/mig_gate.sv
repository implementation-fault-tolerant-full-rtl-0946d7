// mig_gate: the 4x4 Modified Islam Gate (MIG), a parity preserving reversible gate.
//
// Maps (A, B, C, D) to P = A, Q = A xor B, R = AB xor C, S = AB' xor D. The XOR of
// the four outputs always equals the XOR of the four inputs, so a fault that flips a
// single line shows up as a parity mismatch at the outputs. With C = D = 0 one gate
// gives A xor B, AB and AB' at once, which is what the full adder/subtractor uses it
// for. The S term uses the complement of B (AB'), the only form that keeps the parity.
// Purely combinational, no clock.
module mig_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
  assign s = (a & ~b) ^ d;

endmodule
