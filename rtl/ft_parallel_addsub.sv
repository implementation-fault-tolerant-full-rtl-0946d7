// ft_parallel_addsub: WIDTH-bit fault tolerant parallel adder/subtractor.
//
// A ripple chain of ft_full_addsub cells that all share the cntrl line. Cell i adds or
// subtracts bit i of a and b together with the carry/borrow of cell i-1 (cin for bit
// 0), so with cntrl = 0 the chain computes {c_b, s_d} = a + b + cin and with cntrl = 1
// it computes s_d = a - b - cin (mod 2**WIDTH) with c_b = 1 when a borrow leaves the
// top bit. Since each cell produces the borrow itself, no operand is complemented.
// The chain structure and the default WIDTH of 4 are this design's choices; the cell
// is the design's fault tolerant full adder/subtractor.
//
// garbage[4*i +: 4] holds the four garbage lines of cell i. Every cell is parity
// preserving, so per cell the XOR of {s_d[i], carry out, garbage} equals the XOR of
// {a[i], b[i], carry in, cntrl}. Purely combinational; the critical path runs through
// WIDTH cells (two MIG levels and one COG level each).
module ft_parallel_addsub #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  input  logic               cntrl,
  output logic [WIDTH-1:0]   s_d,
  output logic               c_b,
  output logic [rev_pkg::CELL_GARBAGE*WIDTH-1:0] garbage
);

  logic [WIDTH:0] chain;

  assign chain[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    ft_full_addsub u_cell (
      .a       (a[i]),
      .b       (b[i]),
      .cin     (chain[i]),
      .cntrl   (cntrl),
      .s_d     (s_d[i]),
      .c_b     (chain[i+1]),
      .garbage (garbage[rev_pkg::CELL_GARBAGE*i +: rev_pkg::CELL_GARBAGE])
    );
  end

  assign c_b = chain[WIDTH];

endmodule
