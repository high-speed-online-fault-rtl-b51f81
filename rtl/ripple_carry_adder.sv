// ripple_carry_adder: N-bit ripple carry adder made of N/4 rca_cell4 cells.
//
// Cell i adds a[4i+3:4i] and b[4i+3:4i] with the carry-out of cell i-1 (cell 0
// takes cin). Besides the sum and the final carry-out, the carry-out of every
// cell is brought out on cell_cout[i] (c0 .. c14 and cout for N = 64), because
// the fault checker needs each cell's carry-in and carry-out. N = 64 is the
// source design's size; N must be a multiple of 4.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout, cell_cout (N/4 bits).
// Purely combinational.
module ripple_carry_adder
  import mmr_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  input  logic                  cin,
  output logic [N-1:0]          sum,
  output logic                  cout,
  output logic [N/CELL_W-1:0]   cell_cout
);

  localparam int unsigned NCELL = N / CELL_W;

  // Carry into each cell.
  logic [NCELL-1:0] cell_cin;

  always_comb begin
    cell_cin[0] = cin;
    for (int i = 1; i < int'(NCELL); i++) cell_cin[i] = cell_cout[i-1];
  end

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    rca_cell4 u_cell (
      .a   (a[i*CELL_W +: CELL_W]),
      .b   (b[i*CELL_W +: CELL_W]),
      .cin (cell_cin[i]),
      .sum (sum[i*CELL_W +: CELL_W]),
      .cout(cell_cout[i])
    );
  end

  assign cout = cell_cout[NCELL-1];

  initial begin
    assert (N % CELL_W == 0 && N >= 2 * CELL_W)
      else $error("ripple_carry_adder: N must be a multiple of %0d and hold two cells", CELL_W);
  end

endmodule
