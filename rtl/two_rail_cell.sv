// two_rail_cell: one two-rail checker cell.
//
// Takes two rail pairs (a0, a1) and (b0, b1) that are valid when each pair is
// complementary, and outputs the pair
//   z0 = a0 b0 | a1 b1,  z1 = a0 b1 | a1 b0.
// For two valid pairs z0, z1 are complementary; if either input pair has equal
// rails, z0 = z1. This is the standard totally self-checking two-rail cell; the
// source design uses a tree of them without drawing the cell.
//
// Interface: a0, a1, b0, b1 -> z0, z1. Combinational.
module two_rail_cell (
  input  logic a0,
  input  logic a1,
  input  logic b0,
  input  logic b1,
  output logic z0,
  output logic z1
);

  always_comb begin
    z0 = (a0 & b0) | (a1 & b1);
    z1 = (a0 & b1) | (a1 & b0);
  end

endmodule
