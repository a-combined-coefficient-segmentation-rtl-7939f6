// output_unit: delivers each finished block of L filter outputs as a stream.
//
// How it works: capture copies all L accumulators into an output buffer in one cycle, which
// frees the accumulators for the next block. The buffer is then sent one word per accepted
// handshake, ACC_0 first: ACC_j holds y(n0 + j), so outputs leave in time order. busy stays
// high until the last word of the block has been accepted; out_last marks that word.
// The description says only that the block of outputs is read from the accumulators; the
// buffer and the valid/ready stream are this design's choices.
//
// Interface: clk, rst_n; capture (only while busy = 0), acc_in[L]; out_valid, out_ready,
// out_data, out_last; busy.
module output_unit #(
  parameter int unsigned L  = fir_pkg::L_DEF,
  parameter int unsigned AW = 2 * fir_pkg::W_DEF + $clog2(fir_pkg::NMAX_DEF),
  parameter int unsigned LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 capture,
  input  logic signed [AW-1:0] acc_in [L],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [AW-1:0] out_data,
  output logic                 out_last,
  output logic                 busy
);

  logic signed [AW-1:0] buf_q [L];
  logic [LW-1:0]        idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      idx       <= '0;
      for (int i = 0; i < L; i++) buf_q[i] <= '0;
    end else if (capture && !out_valid) begin
      out_valid <= 1'b1;
      idx       <= '0;
      for (int i = 0; i < L; i++) buf_q[i] <= acc_in[i];
    end else if (out_valid && out_ready) begin
      if (idx == LW'(L - 1)) begin
        out_valid <= 1'b0;
        idx       <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  assign out_data = buf_q[idx];
  assign out_last = out_valid && (idx == LW'(L - 1));
  assign busy     = out_valid;

  // A block may only be handed over once the previous one has left.
  a_no_capture_when_busy: assert property (@(posedge clk) disable iff (!rst_n) capture |-> !busy);

endmodule
