// fir_bs_top: low-power FIR filter on a single shift-multiply-accumulate datapath that
// combines block processing with coefficient segmentation.
//
// y(n) = sum_{k=0}^{N-1} h(k) x(n-k) is computed L outputs at a time. Each coefficient is
// fetched once per block and held on the datapath while it is applied to the L samples of
// the data block kept in a register file; between coefficients only one new sample enters
// the register file. Each coefficient is stored pre-split as h = s + m, where s = +/-2^i is
// applied with a shifter and only the small, never-negative residue m goes to the
// Baugh-Wooley multiplier. Holding the coefficient, shortening it and keeping its sign
// fixed all cut switching at the multiplier's coefficient input; fetching each coefficient
// once per block and each sample about once per coefficient cuts memory traffic.
//
// Blocks: coeff_segmenter (splits h on its way into the coefficient memory), two dp_ram
// (coefficient memory of NMAX words {s_neg, s_shamt, m}; data memory ring of DEPTH samples),
// data_regfile (R_0..R_{L-1}), seg_mac (shifter + multiplier + adder), acc_bank
// (ACC_0..ACC_{L-1}), control_unit, input_unit and output_unit.
//
// Interface:
//   run                     process blocks while high
//   num_taps                N, 1 .. NMAX; hold constant while running
//   coef_we/waddr/wdata     write h(waddr) (W-bit two's complement); load while run = 0
//   in_valid/ready/data     input samples x(0), x(1), ... (stall while in_ready = 0)
//   out_valid/ready/data    outputs y(0), y(1), ... in order, AW = 2W + log2(NMAX) bits,
//                           exact (no rounding); out_last marks the last of each block
//   busy                    a block is being computed
// Timing: a block of L outputs takes N*L + N + L + 1 cycles from the cycle its last input
// sample is present to the cycle the results are captured, if the output is free.
// Samples before x(0) count as zero. The block schedule and segmentation rule follow the
// filter's description; memory organisation, handshakes and timing are this design's.
module fir_bs_top #(
  parameter int unsigned W           = fir_pkg::W_DEF,
  parameter int unsigned L           = fir_pkg::L_DEF,
  parameter int unsigned NMAX        = fir_pkg::NMAX_DEF,
  parameter bit          SWAP_INPUTS = 1'b0,
  parameter int unsigned DEPTH       = 2 ** $clog2(NMAX + L),
  parameter int unsigned AW          = 2 * W + $clog2(NMAX),
  parameter int unsigned SW          = $clog2(W),
  parameter int unsigned LW          = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned CAW         = (NMAX > 1) ? $clog2(NMAX) : 1,
  parameter int unsigned NW          = $clog2(NMAX + 1),
  parameter int unsigned DAW         = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [NW-1:0]        num_taps,
  input  logic                 coef_we,
  input  logic [CAW-1:0]       coef_waddr,
  input  logic signed [W-1:0]  coef_wdata,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [AW-1:0] out_data,
  output logic                 out_last,
  output logic                 busy
);
  import fir_pkg::*;

  localparam int unsigned CW = 1 + SW + W;   // coefficient memory word {s_neg, s_shamt, m}

  // ---- coefficient path: segment on the way into the coefficient memory ---------------
  logic          seg_neg, seg_pow2;
  logic [SW-1:0] seg_shamt;
  logic [W-1:0]  seg_m;

  coeff_segmenter #(.W(W), .SW(SW)) u_seg (
    .h       (coef_wdata),
    .s_neg   (seg_neg),
    .s_shamt (seg_shamt),
    .m       (seg_m),
    .is_pow2 (seg_pow2)
  );

  logic           coef_re;
  logic [CAW-1:0] coef_raddr;
  logic [CW-1:0]  coef_rdata;

  dp_ram #(.DW(CW), .DEPTH(NMAX), .AW(CAW)) u_coef_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (coef_we),
    .waddr (coef_waddr),
    .wdata ({seg_neg, seg_shamt, seg_m}),
    .re    (coef_re),
    .raddr (coef_raddr),
    .rdata (coef_rdata)
  );

  // ---- data path into the data memory ---------------------------------------------------
  logic [IDX_W-1:0] wr_count, oldest_needed, n0;
  logic             dmem_we;
  logic [DAW-1:0]   dmem_waddr;
  logic [W-1:0]     dmem_wdata;

  input_unit #(.W(W), .DEPTH(DEPTH), .DAW(DAW)) u_in (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (in_valid),
    .in_data       (in_data),
    .in_ready      (in_ready),
    .oldest_needed (oldest_needed),
    .mem_we        (dmem_we),
    .mem_waddr     (dmem_waddr),
    .mem_wdata     (dmem_wdata),
    .wr_count      (wr_count)
  );

  logic           data_re;
  logic [DAW-1:0] data_raddr;
  logic [W-1:0]   data_rdata;

  dp_ram #(.DW(W), .DEPTH(DEPTH), .AW(DAW)) u_data_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (dmem_we),
    .waddr (dmem_waddr),
    .wdata (dmem_wdata),
    .re    (data_re),
    .raddr (data_raddr),
    .rdata (data_rdata)
  );

  // ---- controller -------------------------------------------------------------------
  logic          rf_ptr_clr, rf_load_en, rf_replace_en, zero_sample;
  logic [LW-1:0] rf_load_idx, rf_rd_off, acc_sel, rf_ptr;
  logic          acc_clear, acc_we, out_capture, out_busy;
  ctrl_state_e   state;

  control_unit #(.L(L), .NMAX(NMAX), .DEPTH(DEPTH), .LW(LW), .CAW(CAW), .NW(NW), .DAW(DAW)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .run           (run),
    .num_taps      (num_taps),
    .wr_count      (wr_count),
    .out_busy      (out_busy),
    .coef_re       (coef_re),
    .coef_raddr    (coef_raddr),
    .data_re       (data_re),
    .data_raddr    (data_raddr),
    .rf_ptr_clr    (rf_ptr_clr),
    .rf_load_en    (rf_load_en),
    .rf_load_idx   (rf_load_idx),
    .rf_replace_en (rf_replace_en),
    .zero_sample   (zero_sample),
    .rf_rd_off     (rf_rd_off),
    .acc_clear     (acc_clear),
    .acc_we        (acc_we),
    .acc_sel       (acc_sel),
    .out_capture   (out_capture),
    .oldest_needed (oldest_needed),
    .n0            (n0),
    .state         (state)
  );

  // ---- register file, shift-multiply-accumulate, accumulators ---------------------------
  logic signed [W-1:0] x_cur;

  data_regfile #(.W(W), .L(L), .LW(LW)) u_rf (
    .clk        (clk),
    .rst_n      (rst_n),
    .ptr_clr    (rf_ptr_clr),
    .load_en    (rf_load_en),
    .load_idx   (rf_load_idx),
    .replace_en (rf_replace_en),
    .wdata      (zero_sample ? '0 : signed'(data_rdata)),
    .rd_off     (rf_rd_off),
    .rd_data    (x_cur),
    .ptr        (rf_ptr)
  );

  logic signed [AW-1:0] acc_cur, acc_next;
  logic signed [AW-1:0] acc_all [L];

  seg_mac #(.W(W), .AW(AW), .SW(SW), .SWAP_INPUTS(SWAP_INPUTS)) u_mac (
    .x       (x_cur),
    .s_neg   (coef_rdata[CW-1]),
    .s_shamt (coef_rdata[W +: SW]),
    .m       (coef_rdata[W-1:0]),
    .acc_in  (acc_cur),
    .acc_out (acc_next)
  );

  acc_bank #(.L(L), .AW(AW), .LW(LW)) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (acc_clear),
    .we      (acc_we),
    .sel     (acc_sel),
    .d       (acc_next),
    .rd_data (acc_cur),
    .acc     (acc_all)
  );

  output_unit #(.L(L), .AW(AW), .LW(LW)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .capture   (out_capture),
    .acc_in    (acc_all),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data),
    .out_last  (out_last),
    .busy      (out_busy)
  );

  assign busy = (state != ST_IDLE);

  // Coefficients are loaded while the filter is stopped.
  a_coef_load_idle: assert property (@(posedge clk) disable iff (!rst_n) coef_we |-> !busy);

endmodule
