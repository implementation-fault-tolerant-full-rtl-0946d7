// cog_gate: the 3x3 controlled operation gate (COG) of the full adder/subtractor.
//
// The adder/subtractor cell uses one 3x3 COG, driven by the add/subtract control, to
// choose which of two results reaches its carry/borrow output. Its equations are this
// design's own choice: a parity preserving controlled exchange. A is the control and
// passes through as P. With A = 0, Q = B and R = C; with A = 1, Q = C and R = B, i.e.
// Q = A'B xor AC and R = A'C xor AB. Because the gate only moves bits, the output
// parity equals the input parity, which keeps the cell fault detecting. Purely
// combinational, no clock.
module cog_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    if (a) begin
      q = c;
      r = b;
    end else begin
      q = b;
      r = c;
    end
  end

endmodule
