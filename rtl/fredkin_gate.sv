// fredkin_gate: the 3x3 Fredkin (controlled exchange) gate.
//
// A is the control and passes through as P. When A = 0, Q = B and R = C; when A = 1
// the two data lines are exchanged, Q = C and R = B. In equations Q = A'B xor AC and
// R = A'C xor AB. The gate moves bits without creating or destroying ones, so it is
// parity preserving, and it is its own inverse. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);

endmodule
