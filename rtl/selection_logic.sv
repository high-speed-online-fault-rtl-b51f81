// selection_logic: decides which checker path, if any, goes through add_one.
//
// The carry-ins of the two selected cells are compared with an XOR. If they
// are equal, both cells must give the same result and both paths pass the
// result straight on (sel0 = sel1 = 0). If the upper cell's carry-in is 0 and
// the lower cell's is 1, the upper cell's result is one short, so sel1 = 1
// routes the upper result through add_one; in the opposite case sel0 = 1 does
// so for the lower path. The XOR compare follows the source design; the exact
// sel equations are this implementation's reading of "the output of the add
// one circuit is passed ... corresponding to carry-in".
//
// Interface: cin_hi, cin_lo -> sel1 (upper path), sel0 (lower path).
// Combinational.
module selection_logic (
  input  logic cin_hi,
  input  logic cin_lo,
  output logic sel1,
  output logic sel0
);

  logic diff;  // carry-ins differ

  always_comb begin
    diff   = cin_hi ^ cin_lo;
    sel1   = diff & cin_lo;
    sel0   = diff & cin_hi;
  end

endmodule
