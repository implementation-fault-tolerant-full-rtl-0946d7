# Fault tolerant reversible full adder/subtractor

A reversible gate maps its inputs to its outputs one to one, so no information is lost
and, in principle, no energy has to be dissipated. A *parity preserving* reversible gate
also keeps the XOR of its outputs equal to the XOR of its inputs. A circuit built only
from such gates has the same property as a whole. If any single line is stuck or flipped
anywhere inside it, the output parity no longer matches the input parity, so the fault
can be seen at the outputs without a separate checking circuit.

This RTL builds a one-bit **full adder/subtractor** from three parity preserving gates:
two Modified Islam Gates (MIG) and one controlled operation gate (COG). One control line,
`cntrl`, selects the operation: 0 adds and 1 subtracts. From that cell it builds a
**WIDTH-bit parallel adder/subtractor**. Beside it is the **set of reversible gates**
the approach draws on: NOT, Feynman, Fredkin, Peres, Toffoli, TSG, MIG, P2RG and COG.

Everything is combinational. There is no clock, no reset and no state.

## Reversible-gate bookkeeping

Reversible blocks have as many outputs as inputs. Extra lines are therefore counted:

* **Constant inputs** are lines tied to a fixed value so that the gate can compute
  something useful.
* **Garbage outputs** are results that are produced but not used.

For any reversible circuit, inputs + constant inputs = useful outputs + garbage. Fewer
gates, constants and garbage lines make a better design. The cell below has 3 gates,
2 constant inputs and 4 garbage outputs: 4 + 2 = 2 + 4.

## The cell: two MIGs and a COG (`ft_full_addsub`)

The MIG is a 4x4 gate:

    P = A   Q = A xor B   R = AB xor C   S = AB' xor D

With C = D = 0, a single MIG gives A xor B, AB and AB' at the same time. The cell uses
that twice, then lets the COG choose the result:

```
          +--------+ P  (garbage 0 = b)
  b ----->| A      |
  a ----->| B MIG1 | Q ---- a^b --------------+
  0 ----->| C      | R ---- ab  -----------+  |
  0 ----->| D      | S ---- a'b ---------+ |  |
          +--------+                     | |  |
          +--------+ P  (garbage 1 = cin)| |  |
  cin --->| A      |                     | |  |
  a^b --->| B MIG2 |<--------------------|-|--+
  ab  --->| C      |<--------------------|-+
  a'b --->| D      |<--------------------+
          |        | Q --> s_d = a ^ b ^ cin
          |        | R --> carry  = cin(a^b)  ^ ab
          |        | S --> borrow = cin(a^b)' ^ a'b
          +--------+
          +--------+ P  (garbage 2 = cntrl)
  cntrl ->| A      |
  carry ->| B COG  | Q --> c_b  (carry if cntrl=0, borrow if cntrl=1)
  borrow->| C      | R     (garbage 3 = the result not chosen)
          +--------+
```

Why it works:

* The sum bit and the difference bit are the same function, a xor b xor cin. MIG2's Q
  output gives it directly.
* The carry of a + b + cin is ab xor cin(a xor b). MIG2 computes R = A·B xor C. Here
  A = cin, B = a xor b and C = ab, so R is the carry.
* The borrow of a − b − cin is a'b xor cin(a xor b)'. MIG2 computes S = A·B' xor D.
  Here D = a'b, so S is the borrow. The trick is to feed **b** into MIG1's A input and
  **a** into its B input. MIG1's S output, AB', then becomes a'b, the term the borrow
  needs.
* The COG exchanges its two data lines when its control is 1. Its Q output is then the
  carry in add mode and the borrow in subtract mode.

All three gates preserve parity, so the whole cell does too:

    s_d ^ c_b ^ garbage[0] ^ garbage[1] ^ garbage[2] ^ garbage[3] == a ^ b ^ cin ^ cntrl

The source design fixes the gate count and types (two MIG, one COG), the ports (A, B, C,
Cntrl in; carry/borrow and sum/difference out) and the control encoding. It does not
define the COG's equations or the exact wiring. Both are choices made here. The COG is
defined as a parity preserving controlled exchange; as a logic function it is the same
as the Fredkin gate. If you have a different COG definition, only `cog_gate.sv` and
the three connections of `u_cog` need to change.

## Word-wide adder/subtractor (`ft_parallel_addsub`)

WIDTH cells (default 4) form a ripple chain that shares `cntrl`. The `c_b` output of
cell i feeds the `cin` input of cell i+1:

* `cntrl = 0`: `{c_b, s_d} = a + b + cin`.
* `cntrl = 1`: `s_d = (a − b − cin) mod 2^WIDTH`, and `c_b = 1` when the result is
  negative.

In subtract mode every cell works out its own borrow, so b is never complemented and no
"+1" is injected. `cin` acts as a borrow-in in subtract mode.

`garbage[4*i +: 4]` holds the garbage lines of cell i. Across the whole chain, the
internal carries each appear once as an input and once as an output, so they cancel:

    ^s_d ^ c_b ^ ^garbage == ^a ^ ^b ^ cin ^ (WIDTH odd ? cntrl : 0)

This check covers the whole word. No parity checker is built in. The parity relation
is a property of the circuit, and the garbage lines are brought out so that a checker
can be placed wherever the system needs one.

The ripple structure and the default width are choices made here. The source design
says a parallel version exists but does not describe it. The critical path is WIDTH
cells of three gate levels each.

## The gate set

One instance of each gate sits in `ft_addsub_top`, with its own ports. Each port is a
vector: bit 0 is the first line (A in, P out), bit 1 the second (B, Q), and so on.

| gate | size | outputs | parity preserving |
|---|---|---|---|
| NOT (`rev_not_gate`) | 1x1 | P = A' | no |
| Feynman (`feynman_gate`) | 2x2 | P = A, Q = A xor B | no |
| Fredkin (`fredkin_gate`) | 3x3 | P = A, Q = A'B xor AC, R = A'C xor AB | yes |
| Peres (`peres_gate`) | 3x3 | P = A, Q = A xor B, R = AB xor C | no |
| Toffoli (`toffoli_gate`) | 3x3 | P = A, Q = B, R = AB xor C | no |
| TSG (`tsg_gate`) | 4x4 | P = A, Q = A xor B, R = A xor B xor D, S = A xor B xor D xor AB xor C | no |
| MIG (`mig_gate`) | 4x4 | P = A, Q = A xor B, R = AB xor C, S = AB' xor D | yes |
| P2RG (`p2rg_gate`) | 5x5 | with X = A'C' xor B': P = A, Q = X xor D, R = XD xor AB xor C, S = AB' xor C xor X'D, T = D xor E xor AC | yes |
| COG (`cog_gate`) | 3x3 | P = A, Q = A'B xor AC, R = A'C xor AB | yes |

Every gate has been checked exhaustively: each is a bijection, and the ones marked yes
preserve parity.

## Where this RTL departs from, or interprets, the source design

* **COG equations and cell wiring.** These are this design's own, as described above.
  The source design's cell has seven garbage outputs and a constant "zero" input line.
  This one has four garbage outputs, and its two constant zeros are tied inside the
  cell.
* **MIG, S output.** The source writes it both as AB' xor D and as AB xor D. AB' xor D
  is used here, because only that form preserves parity.
* **P2RG, S output.** The source writes the last term both as X'D and as XD. X'D is
  used, for the same reason.
* **Fredkin, R output.** One form in the source gives R the same equation as Q. The
  swap behaviour it also states (A = 0: Q = B, R = C; A = 1: Q = C, R = B) is what is
  built.
* **TSG.** The S output is taken as a plain XOR of its terms. Other published TSG
  variants differ.
* **Reference simulation values.** The source's simulation of its cell reports, for
  a = 1, b = 1, cin = 0 in add mode, sum 1 and carry 0 from one instance and carry 1
  from another. Neither agrees with 1 + 1 = 10₂. This RTL follows the arithmetic.
* **Not built.** The source's own top level holds two cell instances side by side, one
  of which is never explained. Only the proposed cell is built. There is also no FPGA
  mapping: the source names no device and gives no resource figures.

## Using and simulating it

The files in `rtl/` are plain SystemVerilog. `rev_pkg.sv` holds the `mode_e` enum
(`MODE_ADD = 0`, `MODE_SUB = 1`) and the per-cell garbage count. It must be compiled
before the other files. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv tb/tb_ft_addsub_top.sv \
          --top-module tb_ft_addsub_top -Mdir obj_top
./obj_top/Vtb_ft_addsub_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ft_addsub_top` | The default top, end to end. It covers all 1024 operand/mode/cin patterns, with the mode switching on most steps, plus every gate of the gate set. It compares results with integer arithmetic and checks word-level parity. It also counts additions, subtractions, carries out, borrows out, full-length ripples and mode switches, and fails if any of them never happened. |
| `tb_ft_parallel_addsub` | All patterns at WIDTH = 4, with per-cell parity checks. |
| `tb_ft_full_addsub` | All 16 input patterns of the cell, plus parity. |
| `tb_addsub_mode_toggle` | Operands held at a = 1, b = 1, cin = 0 while the mode toggles, then every other operand pattern under the same toggling. |
| `tb_<gate>` | Each gate across its whole truth table, plus reversibility and, where it applies, parity. |

To change the word width, set `WIDTH` on `ft_addsub_top` or `ft_parallel_addsub`. The
testbenches use W = 4, the default, so adjust their `W` to match.
