// priority_encoder: turns the cell-equality register cel into the select of a
// cell multiplexer.
//
// With HIGHEST = 1 it is the "upper" encoder and returns the index of the
// highest set bit of req; with HIGHEST = 0 it is the "lower" encoder and
// returns the lowest set bit. When req holds exactly the two bits of a pair of
// cells with equal operands, the two encoders therefore pick the two cells of
// the pair. valid is 0 and idx is 0 when req is all zero. The upper/lower
// split follows the source design; the encoding itself is the usual
// binary-index priority encoder.
//
// Interface: req (NIN bits) -> idx ($clog2(NIN) bits), valid. Combinational.
module priority_encoder #(
  parameter int unsigned NIN     = 16,
  parameter bit          HIGHEST = 1'b1
) (
  input  logic [NIN-1:0]         req,
  output logic [$clog2(NIN)-1:0] idx,
  output logic                   valid
);

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    if (HIGHEST) begin
      for (int i = 0; i < int'(NIN); i++) begin
        if (req[i]) begin
          idx   = i[$clog2(NIN)-1:0];
          valid = 1'b1;
        end
      end
    end else begin
      for (int i = int'(NIN) - 1; i >= 0; i--) begin
        if (req[i]) begin
          idx   = i[$clog2(NIN)-1:0];
          valid = 1'b1;
        end
      end
    end
  end

endmodule
