// rev_pkg: types shared by the reversible adder/subtractor modules.
//
// The control line of the fault tolerant adder/subtractor selects the operation:
// logic 0 adds and logic 1 subtracts, as the design specifies. The enum below names
// those two codes so that testbenches and users do not have to remember them. The
// per-cell garbage count is this implementation's own (two MIG gates and one COG
// gate leave four garbage lines per bit).
package rev_pkg;

  typedef enum logic {
    MODE_ADD = 1'b0,
    MODE_SUB = 1'b1
  } mode_e;

  // Garbage outputs of one full adder/subtractor cell: MIG1.P, MIG2.P, COG.P, COG.R.
  localparam int unsigned CELL_GARBAGE = 4;

endpackage
