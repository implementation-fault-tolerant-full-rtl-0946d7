// ft_addsub_top: fault tolerant reversible adder/subtractor with its gate set.
//
// The main part is a WIDTH-bit parallel adder/subtractor (ft_parallel_addsub) built
// from fault tolerant full adder/subtractor cells: cntrl = 0 gives a + b + cin with a
// carry out, cntrl = 1 gives a - b - cin with a borrow out. All cell garbage lines are
// brought out, so an outside checker can compare output parity with input parity.
//
// Beside it stands the set of reversible gates the design draws on (NOT, Feynman,
// Fredkin, Peres, Toffoli, TSG, MIG, P2RG and COG), one instance each, with their
// own ports. They do not connect to the adder. Each gate port is a vector whose bit
// 0 is the gate's first line (A in, P out), bit 1 the second (B, Q), and so on.
//
// The port names a, b, cin, cntrl, s_d and c_b follow the design's own naming; WIDTH
// = 4 is this implementation's choice. Everything is combinational: no clock, no
// reset, outputs settle after the ripple through WIDTH cells.
module ft_addsub_top #(
  parameter int unsigned WIDTH = 4
) (
  // parallel adder/subtractor
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  input  logic               cntrl,
  output logic [WIDTH-1:0]   s_d,
  output logic               c_b,
  output logic [rev_pkg::CELL_GARBAGE*WIDTH-1:0] garbage,
  // reversible gate set
  input  logic               not_in,
  output logic               not_out,
  input  logic [1:0]         feynman_in,
  output logic [1:0]         feynman_out,
  input  logic [2:0]         fredkin_in,
  output logic [2:0]         fredkin_out,
  input  logic [2:0]         peres_in,
  output logic [2:0]         peres_out,
  input  logic [2:0]         toffoli_in,
  output logic [2:0]         toffoli_out,
  input  logic [3:0]         tsg_in,
  output logic [3:0]         tsg_out,
  input  logic [3:0]         mig_in,
  output logic [3:0]         mig_out,
  input  logic [4:0]         p2rg_in,
  output logic [4:0]         p2rg_out,
  input  logic [2:0]         cog_in,
  output logic [2:0]         cog_out
);

  ft_parallel_addsub #(.WIDTH(WIDTH)) u_addsub (
    .a       (a),
    .b       (b),
    .cin     (cin),
    .cntrl   (cntrl),
    .s_d     (s_d),
    .c_b     (c_b),
    .garbage (garbage)
  );

  rev_not_gate u_not (.a(not_in), .p(not_out));

  feynman_gate u_feynman (
    .a(feynman_in[0]), .b(feynman_in[1]),
    .p(feynman_out[0]), .q(feynman_out[1])
  );

  fredkin_gate u_fredkin (
    .a(fredkin_in[0]), .b(fredkin_in[1]), .c(fredkin_in[2]),
    .p(fredkin_out[0]), .q(fredkin_out[1]), .r(fredkin_out[2])
  );

  peres_gate u_peres (
    .a(peres_in[0]), .b(peres_in[1]), .c(peres_in[2]),
    .p(peres_out[0]), .q(peres_out[1]), .r(peres_out[2])
  );

  toffoli_gate u_toffoli (
    .a(toffoli_in[0]), .b(toffoli_in[1]), .c(toffoli_in[2]),
    .p(toffoli_out[0]), .q(toffoli_out[1]), .r(toffoli_out[2])
  );

  tsg_gate u_tsg (
    .a(tsg_in[0]), .b(tsg_in[1]), .c(tsg_in[2]), .d(tsg_in[3]),
    .p(tsg_out[0]), .q(tsg_out[1]), .r(tsg_out[2]), .s(tsg_out[3])
  );

  mig_gate u_mig (
    .a(mig_in[0]), .b(mig_in[1]), .c(mig_in[2]), .d(mig_in[3]),
    .p(mig_out[0]), .q(mig_out[1]), .r(mig_out[2]), .s(mig_out[3])
  );

  p2rg_gate u_p2rg (
    .a(p2rg_in[0]), .b(p2rg_in[1]), .c(p2rg_in[2]), .d(p2rg_in[3]), .e(p2rg_in[4]),
    .p(p2rg_out[0]), .q(p2rg_out[1]), .r(p2rg_out[2]), .s(p2rg_out[3]), .t(p2rg_out[4])
  );

  cog_gate u_cog (
    .a(cog_in[0]), .b(cog_in[1]), .c(cog_in[2]),
    .p(cog_out[0]), .q(cog_out[1]), .r(cog_out[2])
  );

endmodule
