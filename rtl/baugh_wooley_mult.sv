// baugh_wooley_mult: W x W two's complement array multiplier (Baugh-Wooley form).
//
// How it works: the signed product is formed from unsigned partial-product bits only.
// Bit (i,j) is a[j] & b[i]; the bits where exactly one of i, j is the sign position
// (W-1) are inverted (NAND instead of AND), and two constant ones are added at weights
// 2^W and 2^(2W-1). Row i of the array is the W partial-product bits of b[i], shifted
// left by i. The rows are summed one after another, each row by its own adder stage, as
// in a ripple array multiplier; the result is the exact 2W-bit product, no rounding.
// The multiplier type is the one the filter was evaluated with; the row-by-row adder
// arrangement is this design's choice.
//
// Interface: a (multiplicand, W bits signed), b (multiplier, W bits signed) -> p (2W bits
// signed). Purely combinational.
module baugh_wooley_mult #(
  parameter int unsigned W = fir_pkg::W_DEF
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int unsigned PW = 2 * W;

  logic [W-1:0]  pp  [W];      // partial-product bits, row i belongs to b[i]
  logic [PW-1:0] row [W];      // row i aligned to its weight
  logic [PW-1:0] sum [W+1];    // running sum after each adder stage

  always_comb begin
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        if ((i == W - 1) != (j == W - 1)) pp[i][j] = ~(a[j] & b[i]);
        else                              pp[i][j] =   a[j] & b[i];
      end
      row[i] = PW'(pp[i]) << i;
    end
  end

  // The two correction ones of the Baugh-Wooley form seed the array.
  assign sum[0] = (PW'(1) << W) | (PW'(1) << (PW - 1));

  for (genvar i = 0; i < W; i++) begin : g_row
    assign sum[i+1] = sum[i] + row[i];
  end

  assign p = signed'(sum[W]);

endmodule
