// mmr_rca: N-bit ripple carry adder with Modified Modular Redundancy (MMR)
// online fault detection.
//
// Idea: an N-bit ripple carry adder built from N/4 identical 4-bit cells
// already holds redundant hardware. Whenever two cells happen to get the same
// 4-bit operands, their results must agree (up to the +1 caused by different
// carry-ins), so comparing them tests both cells while the adder does its
// normal work, without a second adder.
//
// Operation (all combinational):
//   * ripple_carry_adder computes sum/cout and exposes each cell's tap
//     m_i = {c_i, sum[4i+3:4i], c_(i-1)} (m_0 uses cin, m_(N/4-1) uses cout).
//   * cel (N/4 bits) is set by an external comparator: it marks the two cells
//     whose a and b slices are equal. The upper priority encoder picks the
//     highest marked cell, the lower encoder the lowest, and two cell_mux
//     instances fetch their taps. Input 0 of the upper multiplexer and input
//     N/4-1 of the lower one are tied to zero, since the upper cell of a pair
//     is never cell 0 and the lower one never the last cell.
//   * selection_logic compares the two carry-ins. When they differ, the
//     result of the cell with carry-in 0 goes through add_one; mux2 picks the
//     direct or incremented 5-bit result {carry-out, sum} for each path.
//   * The two tri_buf instances pass the results (tri_out1 upper, tri_out0
//     lower) only when check_en = carry_done & (cel != 0). The upper result
//     is inverted, so a fault-free pair gives complementary rails.
//   * two_rail_tree reduces the five rail pairs to {fault1, fault0}:
//     complementary (01 or 10) means no fault, equal (00 or 11) means the two
//     cells disagree, i.e. a fault was detected. With check_en = 0 the
//     outputs read "no fault" and carry no information.
//
// The block structure, tap layout, encoder/multiplexer arrangement, XOR
// compare of carry-ins, add-one correction, enabled buffers, inversion of
// one path and two-rail checker follow the source design. Choices of this
// implementation: the tri-state buffers drive zero when disabled (two-state
// logic) and check_en is brought out; carry completion logic is not built
// here and arrives as the input carry_done (tie it to 1 in a synchronous
// system, where the sum is sampled only after it has settled); if cel has more
// than two bits set, the highest and the lowest marked cells are compared.
//
// Parameters: N = 64 (a multiple of 4, at least 8).
// Ports: a, b (N), cin, cel (N/4), carry_done -> sum (N), cout,
//        tri_out1, tri_out0 (5), check_en, fault1, fault0.
module mmr_rca
  import mmr_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  input  logic                cin,
  input  logic [N/CELL_W-1:0] cel,
  input  logic                carry_done,
  output logic [N-1:0]        sum,
  output logic                cout,
  output logic [RES_W-1:0]    tri_out1,
  output logic [RES_W-1:0]    tri_out0,
  output logic                check_en,
  output logic                fault1,
  output logic                fault0
);

  localparam int unsigned NCELL = N / CELL_W;
  localparam int unsigned IDX_W = $clog2(NCELL);

  // ---------------------------------------------------------------- adder
  logic [NCELL-1:0] cell_cout;

  ripple_carry_adder #(.N(N)) u_rca (
    .a        (a),
    .b        (b),
    .cin      (cin),
    .sum      (sum),
    .cout     (cout),
    .cell_cout(cell_cout)
  );

  // Cell taps m_i = {c_i, sum slice, c_(i-1)}.
  cell_tap_t [NCELL-1:0] tap;

  always_comb begin
    for (int i = 0; i < int'(NCELL); i++) begin
      tap[i].res.cout = cell_cout[i];
      tap[i].res.sum  = sum[i*CELL_W +: CELL_W];
      tap[i].cin      = (i == 0) ? cin : cell_cout[(i == 0) ? 0 : i-1];
    end
  end

  // Multiplexer inputs: upper has zero at index 0, lower at index NCELL-1.
  logic [NCELL-1:0][TAP_W-1:0] mux_hi_in;
  logic [NCELL-1:0][TAP_W-1:0] mux_lo_in;

  always_comb begin
    for (int i = 0; i < int'(NCELL); i++) begin
      mux_hi_in[i] = (i == 0)            ? '0 : tap[i];
      mux_lo_in[i] = (i == int'(NCELL)-1) ? '0 : tap[i];
    end
  end

  // ------------------------------------------------ encoders and multiplexers
  logic [IDX_W-1:0] idx_hi;
  logic [IDX_W-1:0] idx_lo;
  logic             any_hi;
  logic             any_lo;

  priority_encoder #(.NIN(NCELL), .HIGHEST(1'b1)) u_enc_hi (
    .req(cel), .idx(idx_hi), .valid(any_hi)
  );

  priority_encoder #(.NIN(NCELL), .HIGHEST(1'b0)) u_enc_lo (
    .req(cel), .idx(idx_lo), .valid(any_lo)
  );

  cell_tap_t tap_hi;
  cell_tap_t tap_lo;

  cell_mux #(.NIN(NCELL), .W(TAP_W)) u_mux_hi (
    .d(mux_hi_in), .sel(idx_hi), .y(tap_hi)
  );

  cell_mux #(.NIN(NCELL), .W(TAP_W)) u_mux_lo (
    .d(mux_lo_in), .sel(idx_lo), .y(tap_lo)
  );

  // ------------------------------------------------------ carry-in correction
  logic sel1;
  logic sel0;

  selection_logic u_sel (
    .cin_hi(tap_hi.cin),
    .cin_lo(tap_lo.cin),
    .sel1  (sel1),
    .sel0  (sel0)
  );

  logic [RES_W-1:0] hi_plus1;
  logic [RES_W-1:0] lo_plus1;
  logic [RES_W-1:0] path_hi;
  logic [RES_W-1:0] path_lo;

  add_one #(.W(RES_W)) u_add1_hi (.x(tap_hi.res), .y(hi_plus1));
  add_one #(.W(RES_W)) u_add1_lo (.x(tap_lo.res), .y(lo_plus1));

  mux2 #(.W(RES_W)) u_mux2_hi (.d0(tap_hi.res), .d1(hi_plus1), .sel(sel1), .y(path_hi));
  mux2 #(.W(RES_W)) u_mux2_lo (.d0(tap_lo.res), .d1(lo_plus1), .sel(sel0), .y(path_lo));

  // ------------------------------------------------------- buffers and checker
  // The buffers are enabled only when some cell pair is marked and the carry
  // has completed. any_lo equals any_hi; both are kept for symmetry.
  assign check_en = carry_done & any_hi & any_lo;

  tri_buf #(.W(RES_W)) u_buf_hi (.en(check_en), .d(path_hi), .y(tri_out1));
  tri_buf #(.W(RES_W)) u_buf_lo (.en(check_en), .d(path_lo), .y(tri_out0));

  two_rail_tree #(.NPAIR(RES_W)) u_checker (
    .x (tri_out0),
    .y (~tri_out1),
    .f0(fault0),
    .f1(fault1)
  );

endmodule
