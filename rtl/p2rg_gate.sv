// p2rg_gate: the 5x5 parity preserving reversible gate P2RG.
//
// With X = A'C' xor B', the gate maps (A, B, C, D, E) to
//   P = A
//   Q = X xor D
//   R = XD xor AB xor C
//   S = AB' xor C xor X'D
//   T = (D xor E) xor AC
// The XOR of the five outputs equals the XOR of the five inputs, so a single flipped
// line is detectable by parity. The S term uses the complement X'; with X in its place
// the parity would not be kept. Purely combinational, no clock.
module p2rg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  logic x;

  assign x = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = x ^ d;
  assign r = (x & d) ^ (a & b) ^ c;
  assign s = (a & ~b) ^ c ^ (~x & d);
  assign t = (d ^ e) ^ (a & c);

endmodule
