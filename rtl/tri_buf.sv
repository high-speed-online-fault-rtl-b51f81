// tri_buf: the enabled buffer between a checker path and the two-rail checker.
//
// In the source design this is a tri-state buffer that floats its output while
// the checker is inactive. This implementation is for two-state logic, so a
// disabled buffer drives all zeros instead of high impedance, and the enable
// is also available to the surrounding logic (the top brings it out as
// check_en). With both buffers disabled the two-rail checker then sees a
// valid code word and reports "no fault", which matches the quiet state of
// the source's simulation.
//
// Interface: en, d (W bits) -> y (W bits). Combinational.
module tri_buf #(
  parameter int unsigned W = 5
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] y
);

  always_comb y = en ? d : '0;

endmodule
