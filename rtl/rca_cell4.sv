// rca_cell4: the 4-bit ripple carry adder cell, the basic functional unit of
// the N-bit adder.
//
// Four full adders are chained from bit 0 to bit 3; each produces
// s = a ^ b ^ c and passes on the majority of (a, b, c) as carry. That the
// adder is built from 4-bit cells follows the source design; how a cell is
// built inside (a plain full-adder ripple) is this implementation's choice.
//
// Interface: a, b (4 bits), cin -> sum (4 bits), cout. Purely combinational,
// no clock.
module rca_cell4
  import mmr_pkg::*;
(
  input  logic [CELL_W-1:0] a,
  input  logic [CELL_W-1:0] b,
  input  logic              cin,
  output logic [CELL_W-1:0] sum,
  output logic              cout
);

  logic c;  // carry between full adders

  always_comb begin
    c = cin;
    for (int i = 0; i < int'(CELL_W); i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    cout = c;
  end

endmodule
