// csca_cell: one bit of the carry-select adder.
//
// Every bit of a carry-select group computes two candidate results at once:
// one for a group carry-in of 0 and one for a group carry-in of 1. The cell
// takes the two conditional carries from the bit below (ci0, ci1), produces
// its own two conditional carries (co0, co1) for the bit above, and outputs
// the sum bit chosen by the group's carry-select signal cs.
//
// FIRST = 1 gives the cell at the bottom of a group (csca0): its conditional
// carries in are the constants 0 and 1, so ci0/ci1 are ignored. FIRST = 0
// gives the general cell (csca1). A full-custom layout also has
// inverted-polarity versions of both cells; they compute the same function
// and are not separate modules here. The cell names and the two-carry-chain
// structure follow the reference architecture; the gate equations are
// written here from the function. Purely combinational.
module csca_cell #(
  parameter bit FIRST = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic ci0,   // carry into this bit if the group carry-in is 0
  input  logic ci1,   // carry into this bit if the group carry-in is 1
  input  logic cs,    // group carry-in (selects between the two results)
  output logic co0,
  output logic co1,
  output logic s
);
  logic c0, c1, p, g;

  always_comb begin
    c0  = FIRST ? 1'b0 : ci0;
    c1  = FIRST ? 1'b1 : ci1;
    p   = a ^ b;
    g   = a & b;
    co0 = g | (p & c0);
    co1 = g | (p & c1);
    s   = p ^ (cs ? c1 : c0);
  end
endmodule
