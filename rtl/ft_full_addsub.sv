// ft_full_addsub: one-bit fault tolerant full adder/subtractor from reversible gates.
//
// One cell does either job, chosen by cntrl: with cntrl = 0 it adds (s_d = A xor B
// xor C, c_b = carry of A + B + C); with cntrl = 1 it subtracts (s_d = difference,
// c_b = borrow of A - B - C). It is built, as the design specifies, from two MIG gates
// and one COG gate, all parity preserving, so the XOR of every output line (s_d, c_b
// and the four garbage lines) equals the XOR of every input line (a, b, cin, cntrl and
// the two constant zeros). A single stuck or flipped line therefore shows up as a
// parity mismatch.
//
// The wiring is this design's own, chosen to meet that gate count:
//   MIG1 (A=b, B=a, C=0, D=0)         -> P=b (garbage), Q=a^b, R=ab, S=a'b
//   MIG2 (A=cin, B=a^b, C=ab, D=a'b)  -> P=cin (garbage), Q=a^b^cin = sum/difference,
//                                        R=cin(a^b) ^ ab   = carry,
//                                        S=cin(a^b)' ^ a'b = borrow
//   COG  (A=cntrl, B=carry, C=borrow) -> P=cntrl (garbage), Q=c_b, R=unused result
// The cell has 2 constant inputs and 4 garbage outputs: 4 + 2 = 2 + 4.
//
// Interface: single-bit a, b, cin, cntrl; outputs s_d, c_b and garbage[3:0] =
// {COG.R, COG.P, MIG2.P, MIG1.P}. Purely combinational, three gate levels deep.
module ft_full_addsub (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic       cntrl,
  output logic       s_d,
  output logic       c_b,
  output logic [rev_pkg::CELL_GARBAGE-1:0] garbage
);

  localparam logic ZERO = 1'b0;

  logic a_xor_b, a_and_b, an_and_b;
  logic carry, borrow;

  mig_gate u_mig1 (
    .a (b),
    .b (a),
    .c (ZERO),
    .d (ZERO),
    .p (garbage[0]),
    .q (a_xor_b),
    .r (a_and_b),
    .s (an_and_b)
  );

  mig_gate u_mig2 (
    .a (cin),
    .b (a_xor_b),
    .c (a_and_b),
    .d (an_and_b),
    .p (garbage[1]),
    .q (s_d),
    .r (carry),
    .s (borrow)
  );

  cog_gate u_cog (
    .a (cntrl),
    .b (carry),
    .c (borrow),
    .p (garbage[2]),
    .q (c_b),
    .r (garbage[3])
  );

endmodule
