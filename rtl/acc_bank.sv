// acc_bank: the accumulators ACC_0..ACC_{L-1}, one per output of the current block.
//
// How it works: clear sets every accumulator to zero (step 1 of the block schedule).
// With we = 1, ACC_sel takes d on the clock edge; d is the seg_mac result computed from
// ACC_sel's current value, which rd_data presents combinationally. All accumulators are
// visible on acc so that the finished block can be handed to the output unit in one cycle.
// Accumulator count and use follow the filter's description; the width (2W product bits
// plus log2(NMAX) guard bits, so no sum of NMAX products can overflow) is this design's.
//
// Interface: clk, rst_n; clear; we, sel, d; rd_data = ACC_sel; acc[] = all accumulators.
module acc_bank #(
  parameter int unsigned L  = fir_pkg::L_DEF,
  parameter int unsigned AW = 2 * fir_pkg::W_DEF + $clog2(fir_pkg::NMAX_DEF),
  parameter int unsigned LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 we,
  input  logic [LW-1:0]        sel,
  input  logic signed [AW-1:0] d,
  output logic signed [AW-1:0] rd_data,
  output logic signed [AW-1:0] acc [L]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) acc[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < L; i++) acc[i] <= '0;
    end else if (we) begin
      acc[sel] <= d;
    end
  end

  assign rd_data = acc[sel];

endmodule
