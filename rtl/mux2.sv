// mux2: the 5-bit 2-to-1 multiplexer of each checker path.
//
// Input 0 is the selected cell's own result, input 1 is that result plus one
// (from add_one); sel comes from the selection logic. The 5-bit width and the
// input order (0 = direct, 1 = add-one) follow the source design's block
// diagram.
//
// Interface: d0, d1 (W bits), sel -> y (W bits). Combinational.
module mux2 #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
