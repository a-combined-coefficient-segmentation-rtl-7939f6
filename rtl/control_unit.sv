// control_unit: sequences the combined block-processing / coefficient-segmentation filter.
//
// For every block of L outputs y(n0) .. y(n0+L-1) it runs this schedule:
//   ST_IDLE  wait until samples up to x(n0+L-1) are in the data memory and the run input is
//            high; then clear ACC_0..ACC_{L-1}, fetch the segmented coefficient (s, m) of
//            h(N-1) and the first sample of the block, x(n0-(N-1)).                1 cycle
//   ST_LOAD  the data block x(n0-(N-1)) .. x(n0-(N-1)+L-1) arrives and is written to
//            R_0 .. R_{L-1}, one register per cycle.                               L cycles
//   ST_MAC   for coefficient k, ACC_j += x(n0+j-k) * h(k) for j = 0 .. L-1, one per
//            cycle; x(n0+j-k) is the data register j places younger than the oldest.
//            The coefficient stays on the shifter and multiplier for all L cycles.  L cycles
//            On the last of them the next coefficient h(k-1) and the one new sample
//            x(n0+L-k) are fetched (or, for k = 0, the block is complete).
//   ST_UPD   the new sample replaces the oldest one in the register file.          1 cycle
//   ST_OUT   wait until the output unit is free, hand the accumulators over, n0 += L.
// A block therefore takes N*L + N + L + 1 cycles when nothing stalls, and reads N
// coefficients and N + L - 1 samples from memory, against N*L of each for direct
// filtering. Coefficients are used from h(N-1) down to h(0), and the data block is updated
// by one sample per coefficient with the registers then used in circular order, as in the
// filter's description. Samples before x(0) are taken as zero (zero_sample), so the first
// outputs are those of a filter started from rest.
//
// The description's step list pairs register R_j with accumulator ACC_j after every update,
// which does not give the filter equation; this unit follows the worked example instead
// (ACC_j collects y(n0+j), and after each update the oldest register goes to ACC_0). The
// one-operation-per-cycle timing, the handshakes and the zero start are this design's.
//
// Interface: run, num_taps (1 .. NMAX, to be held constant while running), wr_count from
// the input unit, out_busy from the output unit; memory read strobes and addresses (read
// data one cycle later); register-file, accumulator and output-unit controls;
// oldest_needed for the input unit's flow control; n0 and state for observation.
module control_unit #(
  parameter int unsigned L     = fir_pkg::L_DEF,
  parameter int unsigned NMAX  = fir_pkg::NMAX_DEF,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned LW    = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned CAW   = (NMAX > 1) ? $clog2(NMAX) : 1,
  parameter int unsigned NW    = $clog2(NMAX + 1),
  parameter int unsigned DAW   = $clog2(DEPTH),
  parameter int unsigned IDX_W = fir_pkg::IDX_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic [NW-1:0]            num_taps,
  input  logic [IDX_W-1:0]         wr_count,
  input  logic                     out_busy,
  // coefficient memory read port
  output logic                     coef_re,
  output logic [CAW-1:0]           coef_raddr,
  // data memory read port
  output logic                     data_re,
  output logic [DAW-1:0]           data_raddr,
  // data register file
  output logic                     rf_ptr_clr,
  output logic                     rf_load_en,
  output logic [LW-1:0]            rf_load_idx,
  output logic                     rf_replace_en,
  output logic                     zero_sample,   // the sample now arriving lies before x(0)
  output logic [LW-1:0]            rf_rd_off,
  // accumulators
  output logic                     acc_clear,
  output logic                     acc_we,
  output logic [LW-1:0]            acc_sel,
  // output unit
  output logic                     out_capture,
  // flow control and observation
  output logic [IDX_W-1:0]         oldest_needed,
  output logic [IDX_W-1:0]         n0,
  output fir_pkg::ctrl_state_e     state
);
  import fir_pkg::*;

  logic [CAW-1:0] k;        // coefficient index being processed
  logic [NW-1:0]  ntaps;    // N, taken at the start of each block
  logic [LW-1:0]  j;        // position within the block (load or MAC)
  logic           primed;   // n0 >= NMAX: no sample of any block can lie before x(0)
  logic           start;
  logic [IDX_W-1:0] fill;

  assign fill  = wr_count - n0;
  assign start = (state == ST_IDLE) && run && (fill >= IDX_W'(L));

  // ---- next-read bookkeeping --------------------------------------------------------
  logic [IDX_W-1:0] rd_idx;     // index of the sample being fetched this cycle
  logic             rd_neg;     // ... and whether it lies before x(0)
  logic             last_mac;

  assign last_mac = (state == ST_MAC) && (j == LW'(L - 1));

  always_comb begin
    rd_idx = '0;
    rd_neg = 1'b0;
    if (start) begin
      rd_idx = n0 - IDX_W'(num_taps) + 1'b1;
      rd_neg = !primed && (n0 + 1 < IDX_W'(num_taps));
    end else if (state == ST_LOAD) begin
      rd_idx = n0 - IDX_W'(ntaps) + IDX_W'(j) + IDX_W'(2);
      rd_neg = !primed && (n0 + IDX_W'(j) + 2 < IDX_W'(ntaps));
    end else if (last_mac) begin
      rd_idx = n0 + IDX_W'(L) - IDX_W'(k);
      rd_neg = !primed && (n0 + IDX_W'(L) < IDX_W'(k));
    end
  end

  assign data_re    = start || ((state == ST_LOAD) && (j != LW'(L - 1))) || (last_mac && (k != '0));
  assign data_raddr = rd_idx[DAW-1:0];
  assign coef_re    = start || (last_mac && (k != '0));
  assign coef_raddr = start ? CAW'(num_taps - 1'b1) : (k - 1'b1);

  // ---- datapath controls ------------------------------------------------------------
  assign rf_ptr_clr    = start;
  assign rf_load_en    = (state == ST_LOAD);
  assign rf_load_idx   = j;
  assign rf_replace_en = (state == ST_UPD);
  assign rf_rd_off     = j;
  assign acc_clear     = start;
  assign acc_we        = (state == ST_MAC);
  assign acc_sel       = j;
  assign out_capture   = (state == ST_OUT) && !out_busy;
  assign oldest_needed = n0 - IDX_W'(num_taps) + 1'b1;

  // ---- state machine ----------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      k           <= '0;
      ntaps       <= NW'(1);
      j           <= '0;
      n0          <= '0;
      primed      <= 1'b0;
      zero_sample <= 1'b0;
    end else begin
      zero_sample <= rd_neg;
      unique case (state)
        ST_IDLE: if (start) begin
          ntaps <= num_taps;
          k     <= CAW'(num_taps - 1'b1);
          j     <= '0;
          state <= ST_LOAD;
        end
        ST_LOAD: begin
          if (j == LW'(L - 1)) begin
            j     <= '0;
            state <= ST_MAC;
          end else begin
            j <= j + 1'b1;
          end
        end
        ST_MAC: begin
          if (j == LW'(L - 1)) begin
            j     <= '0;
            state <= (k == '0) ? ST_OUT : ST_UPD;
          end else begin
            j <= j + 1'b1;
          end
        end
        ST_UPD: begin
          k     <= k - 1'b1;
          state <= ST_MAC;
        end
        ST_OUT: if (!out_busy) begin
          n0     <= n0 + IDX_W'(L);
          if (n0 >= IDX_W'(NMAX)) primed <= 1'b1;
          state  <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // num_taps must name a tap count the coefficient memory can hold.
  a_num_taps_range: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (num_taps >= NW'(1)) && (num_taps <= NW'(NMAX)));

endmodule
