// cell_mux: the 16-to-1 multiplexer that picks one cell tap for the checker.
//
// d[k] is routed to y when sel = k. In the MMR adder each input is a 6-bit tap
// {carry-out, sum[3:0], carry-in} of one cell, and the unused input of each
// multiplexer is tied to zero by the instantiating module. The 16 inputs and
// 6-bit width are the source design's (64-bit adder, 16 cells); both are
// parameters.
//
// Interface: d (NIN words of W bits), sel -> y (W bits). Combinational.
module cell_mux #(
  parameter int unsigned NIN = 16,
  parameter int unsigned W   = 6
) (
  input  logic [NIN-1:0][W-1:0]  d,
  input  logic [$clog2(NIN)-1:0] sel,
  output logic [W-1:0]           y
);

  always_comb begin
    y = '0;
    for (int k = 0; k < int'(NIN); k++) begin
      if (sel == k[$clog2(NIN)-1:0]) y = d[k];
    end
  end

endmodule
