// coeff_segmenter: splits a coefficient h into a power-of-two part s and a residue m,
// h = s + m, so that x*h = (x shifted by s) + x*m.
//
// How it works (combinational, one coefficient per evaluation):
//   1. find the smallest i with 2^i >= |h|;
//   2. if |h| == 2^i the whole coefficient is a shift: s = h, m = 0;
//   3. otherwise, for h > 0: s = 2^(i-1), m = h - s; for h <= 0: s = -2^i, m = h - s.
// m therefore never goes negative and stays below 2^(W-2), so consecutive multiplier
// coefficients share one polarity and have short effective word length. s is delivered as
// a sign and a shift amount, the control inputs of the shifter.
// The three decisions and their outcomes follow the published segmentation flowchart,
// including its treatment of h = 0 (taken by the "h <= 0" branch: s = -1, m = 1). The
// flowchart iterates i one step at a time; here the same search is a priority encoder,
// so the unit is purely combinational (a design choice).
//
// Interface: h (signed, W bits) in; s_neg, s_shamt, m, is_pow2 out. No clock.
module coeff_segmenter #(
  parameter int unsigned W  = fir_pkg::W_DEF,
  parameter int unsigned SW = $clog2(W)
) (
  input  logic signed [W-1:0]  h,
  output logic                 s_neg,    // s is negative
  output logic        [SW-1:0] s_shamt,  // |s| = 2^s_shamt
  output logic        [W-1:0]  m,        // multiplier part, always >= 0
  output logic                 is_pow2   // stage 2 taken: m = 0
);

  logic [W:0]    mag;      // |h|, one bit wider so that |-2^(W-1)| fits
  logic [SW-1:0] i_sel;    // stage 1 result
  logic [W:0]    pow_i;    // 2^i_sel

  always_comb begin
    mag = h[W-1] ? ({1'b0, ~h} + 1'b1) : {1'b0, h};

    // Stage 1: smallest i with 2^i >= |h|. Scanning downwards keeps the last (smallest) hit.
    i_sel = SW'(W - 1);
    for (int i = W - 1; i >= 0; i--) begin
      if (((W+1)'(1) << i) >= mag) i_sel = SW'(i);
    end
    pow_i = (W+1)'(1) << i_sel;

    is_pow2 = (pow_i == mag);
    if (is_pow2) begin
      // Stage 2: h is +/-2^i
      s_neg   = h[W-1];
      s_shamt = i_sel;
      m       = '0;
    end else if (!h[W-1] && (h != '0)) begin
      // Stage 3, h > 0: s = 2^(i-1)
      s_neg   = 1'b0;
      s_shamt = i_sel - 1'b1;
      m       = W'(mag - (pow_i >> 1));
    end else begin
      // Stage 3, h <= 0: s = -2^i
      s_neg   = 1'b1;
      s_shamt = i_sel;
      m       = W'(pow_i - mag);
    end
  end

endmodule
