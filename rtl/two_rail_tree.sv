// two_rail_tree: tree of two-rail checker cells that reduces NPAIR rail pairs
// to the single output pair {f1, f0}.
//
// Pair i is (x[i], y[i]) and is valid when y[i] = ~x[i]. The tree is a
// complete binary tree stored like a heap: node k (k < NPAIR-1) is a
// two_rail_cell fed by nodes 2k+1 and 2k+2, the leaves NPAIR-1 .. 2*NPAIR-2
// are the input pairs, and node 0 is the output. f0 and f1 are complementary
// when all pairs are valid and equal when any pair is not, so equal outputs
// signal a fault. NPAIR = 5 is the width of a cell result in the source
// design; the tree shape is this implementation's choice.
//
// Interface: x, y (NPAIR bits) -> f0, f1. Combinational.
module two_rail_tree #(
  parameter int unsigned NPAIR = 5
) (
  input  logic [NPAIR-1:0] x,
  input  logic [NPAIR-1:0] y,
  output logic             f0,
  output logic             f1
);

  localparam int unsigned NNODE = 2 * NPAIR - 1;

  logic [NNODE-1:0] r0;
  logic [NNODE-1:0] r1;

  for (genvar i = 0; i < NPAIR; i++) begin : g_leaf
    assign r0[NPAIR-1+i] = x[i];
    assign r1[NPAIR-1+i] = y[i];
  end

  for (genvar k = 0; k < NPAIR - 1; k++) begin : g_node
    two_rail_cell u_cell (
      .a0(r0[2*k+1]),
      .a1(r1[2*k+1]),
      .b0(r0[2*k+2]),
      .b1(r1[2*k+2]),
      .z0(r0[k]),
      .z1(r1[k])
    );
  end

  assign f0 = r0[0];
  assign f1 = r1[0];

endmodule
