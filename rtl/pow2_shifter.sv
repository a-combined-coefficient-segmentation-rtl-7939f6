// pow2_shifter: multiplies a data sample by the shift part of a segmented coefficient,
// s = +/-2^shamt, using a left shift and an optional negation.
//
// Interface: x (W bits signed), neg and shamt (the shifter's control inputs) -> y (2W bits
// signed) = x * s, exact. Purely combinational. The shifter unit and its control inputs
// come from the filter's description; the sign-plus-amount encoding of s is this design's
// choice.
module pow2_shifter #(
  parameter int unsigned W  = fir_pkg::W_DEF,
  parameter int unsigned SW = $clog2(W)
) (
  input  logic signed [W-1:0]   x,
  input  logic                  neg,
  input  logic        [SW-1:0]  shamt,
  output logic signed [2*W-1:0] y
);

  logic signed [2*W-1:0] shifted;

  always_comb begin
    shifted = (2*W)'(x) <<< shamt;
    y       = neg ? -shifted : shifted;
  end

endmodule
