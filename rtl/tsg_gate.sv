// tsg_gate: the 4x4 TSG gate in the form used by this design.
//
// Maps (A, B, C, D) to P = A, Q = A xor B, R = A xor B xor D and
// S = (A xor B) xor D xor AB xor C, the equations the design gives for it. The S
// equation is taken as a plain XOR of its terms (a choice: other TSG variants in use
// put an AND between A xor B and D). The mapping is reversible: A comes back from P,
// B from P and Q, D from Q and R, and C from S once A, B and D are known. It is not
// parity preserving. Purely combinational, no clock.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic axb;

  assign axb = a ^ b;
  assign p   = a;
  assign q   = axb;
  assign r   = axb ^ d;
  assign s   = axb ^ d ^ (a & b) ^ c;

endmodule
