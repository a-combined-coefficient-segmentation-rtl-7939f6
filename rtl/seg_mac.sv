// seg_mac: one step of the segmented multiply-accumulate, acc_out = acc_in + x*m + x*s.
//
// How it works: the data sample x goes to both the pow2_shifter (driven by the shift part
// s of the current coefficient) and the baugh_wooley_mult (driven by the multiplier part
// m). The two products and the accumulator value are added. Because h = s + m the sum is
// exactly acc_in + x*h. Applying x to both units and adding their results to the
// accumulator follows the filter's description; doing it in one combinational stage is
// this design's choice.
// SWAP_INPUTS selects which multiplier operand carries the data: 0 puts x on the
// multiplicand (a) and m on the multiplier (b); 1 swaps them. The two are equal in value
// but not in switching activity, since the array is not symmetric.
//
// Interface: x, s_neg, s_shamt, m, acc_in -> acc_out (AW bits signed). Combinational.
module seg_mac #(
  parameter int unsigned W           = fir_pkg::W_DEF,
  parameter int unsigned AW          = 2 * W + $clog2(fir_pkg::NMAX_DEF),
  parameter int unsigned SW          = $clog2(W),
  parameter bit          SWAP_INPUTS = 1'b0
) (
  input  logic signed [W-1:0]  x,
  input  logic                 s_neg,
  input  logic        [SW-1:0] s_shamt,
  input  logic        [W-1:0]  m,
  input  logic signed [AW-1:0] acc_in,
  output logic signed [AW-1:0] acc_out
);

  logic signed [W-1:0]   mul_a, mul_b;
  logic signed [2*W-1:0] mul_p, shf_p;

  assign mul_a = SWAP_INPUTS ? signed'(m) : x;
  assign mul_b = SWAP_INPUTS ? x : signed'(m);

  baugh_wooley_mult #(.W(W)) u_mult (
    .a (mul_a),
    .b (mul_b),
    .p (mul_p)
  );

  pow2_shifter #(.W(W), .SW(SW)) u_shift (
    .x     (x),
    .neg   (s_neg),
    .shamt (s_shamt),
    .y     (shf_p)
  );

  assign acc_out = acc_in + AW'(mul_p) + AW'(shf_p);

endmodule
