// mmr_pkg: widths and record types shared by the Modified Modular Redundancy
// (MMR) fault-detecting ripple carry adder.
//
// The adder is cut into 4-bit cells. Each cell exposes a 6-bit "tap"
// {carry-out, sum[3:0], carry-in}; the checker compares the 5-bit result
// {carry-out, sum[3:0]} of two cells that received the same operands. The
// 4-bit cell size and the tap layout follow the source design; the names of
// the types are this implementation's own.
package mmr_pkg;

  // Operand bits per adder cell.
  localparam int unsigned CELL_W = 4;
  // Bits of a cell result: carry-out and sum.
  localparam int unsigned RES_W  = CELL_W + 1;
  // Bits of a cell tap: result plus the cell's carry-in.
  localparam int unsigned TAP_W  = RES_W + 1;

  // Result of one 4-bit cell.
  typedef struct packed {
    logic              cout;
    logic [CELL_W-1:0] sum;
  } cell_res_t;

  // Tap of one cell as seen by the 16-to-1 multiplexers: m_i = {c_i, sum, c_(i-1)}.
  typedef struct packed {
    cell_res_t res;
    logic      cin;
  } cell_tap_t;

endpackage
