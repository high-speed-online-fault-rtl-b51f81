// add_one: the "add 1" circuit of the MMR checker.
//
// Two cells that receive the same operands but whose carry-ins differ give
// results that differ by exactly one. The add-one circuit increments the
// 5-bit result {carry-out, sum[3:0]} of the cell whose carry-in was 0 so that
// it can be compared with the other cell. The largest cell result with a
// carry-in of 0 is 15 + 15 = 30, so y = x + 1 never wraps. Built as a
// half-adder chain (an incrementer); the source design only names the circuit.
//
// Interface: x (W bits) -> y (W bits). Combinational.
module add_one #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic c;  // carry between half adders

  always_comb begin
    c = 1'b1;
    for (int i = 0; i < int'(W); i++) begin
      y[i] = x[i] ^ c;
      c    = x[i] & c;
    end
  end

endmodule
