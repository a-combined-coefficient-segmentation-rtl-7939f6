// tb_fir_bs_top: end-to-end test of the filter at its default sizes (W = 16, L = 2,
// NMAX = 128). For several tap counts it loads random coefficients (mixed with zeros,
// +/- powers of two and the most negative value), streams random samples with gaps, drains
// the outputs with random back-pressure and compares every output with a direct
// convolution y(n) = sum h(k) x(n-k), samples before x(0) being zero.
// It also checks, per block, the memory traffic (N coefficient reads and N + L - 1 sample
// reads) and the block time N*L + N + L + 1 cycles, and counts how often each mechanism
// occurred: input stall, output back-pressure, waiting for input, zero samples before x(0),
// register-file wrap-around, and each branch of the coefficient split.
module tb_fir_bs_top;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = W_DEF, L = L_DEF, NMAX = NMAX_DEF, AW = 2 * W + $clog2(NMAX);

  logic                 run, coef_we, in_valid, in_ready, out_valid, out_ready, out_last, busy;
  logic [7:0]           num_taps;
  logic [6:0]           coef_waddr;
  logic signed [W-1:0]  coef_wdata, in_data;
  logic signed [AW-1:0] out_data;

  fir_bs_top dut (.*);

  // mechanism counters
  int n_in_stall, n_out_bp, n_wait_in, n_zero, n_wrap, n_pow2, n_pos, n_nonpos, n_hzero;
  int n_timed_blocks;

  longint h [NMAX];
  longint x [$];
  int     n_out, n_sent, taps;
  bit     in_ready_q;
  int     blk_cyc, blk_cre, blk_dre, out_wait;
  bit     in_blk;

  // per-block traffic and timing
  always @(posedge clk) if (rst_n) begin
    if (dut.acc_clear) begin in_blk = 1; blk_cyc = 0; blk_cre = 0; blk_dre = 0; out_wait = 0; end
    if (in_blk) begin
      blk_cyc++;
      if (dut.coef_re) blk_cre++;
      if (dut.data_re) blk_dre++;
      if (dut.state == ST_OUT) out_wait++;
    end
    if (dut.out_capture) begin
      checks += 2;
      if (blk_cre != taps) failures++;
      if (blk_dre != taps + L - 1) failures++;
      if (out_wait == 1) begin
        checks++; n_timed_blocks++;
        if (blk_cyc != taps * L + taps + L + 1) begin
          failures++;
          $display("FAIL block time %0d cycles, expected %0d", blk_cyc, taps * L + taps + L + 1);
        end
      end
      in_blk = 0;
    end
    if (in_valid && !in_ready) n_in_stall++;
    if (out_valid && !out_ready) n_out_bp++;
    if (dut.state == ST_IDLE && run && !dut.u_ctrl.start) n_wait_in++;
    if ((dut.rf_load_en || dut.rf_replace_en) && dut.zero_sample) n_zero++;
    if (dut.rf_replace_en && dut.rf_ptr == LW_T'(L - 1)) n_wrap++;
    if (coef_we) begin
      if (dut.seg_pow2) n_pow2++;
      else if (coef_wdata > 0) n_pos++;
      else n_nonpos++;
      if (coef_wdata == 0) n_hzero++;
    end
  end
  localparam int LW_T = (L > 1) ? $clog2(L) : 1;

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint exp;
    exp = 0;
    for (int k = 0; k < taps; k++) if (n_out - k >= 0) exp += h[k] * x[n_out - k];
    checks++;
    if (longint'(out_data) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d y(%0d) = %0d, expected %0d", taps, n_out, out_data, exp);
    end
    checks++;
    if (out_last != ((n_out % L) == L - 1)) failures++;
    n_out++;
  end

  task automatic run_config(input int ntaps, input int nsamples, input int in_rate, input int out_rate);
    rst_n = 0; run = 0; coef_we = 0; in_valid = 0; out_ready = 0; in_data = 0;
    coef_waddr = 0; coef_wdata = 0; num_taps = 8'(ntaps);
    taps = ntaps; n_out = 0; n_sent = 0; in_blk = 0; x.delete();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < ntaps; k++) begin
      int sel;
      longint v;
      sel = $urandom % 8;
      case (sel)
        0: v = 0;
        1: v = longint'(1) << ($urandom % 15);
        2: v = -(longint'(1) << ($urandom % 16));
        default: v = longint'($signed(16'($urandom)));
      endcase
      h[k] = v;
      @(negedge clk);
      coef_we = 1; coef_waddr = 7'(k); coef_wdata = 16'(v);
    end
    @(negedge clk);
    coef_we = 0;
    run = 1;
    while (n_out < nsamples) begin
      @(negedge clk);
      // keep the last accepted sample's data stable until accepted
      if (!(in_valid && !in_ready_q)) begin
        in_valid = (n_sent < nsamples) && ($urandom % 100 < in_rate);
        in_data  = 16'($urandom);
        if ($urandom % 16 == 0) in_data = 16'sh8000;
      end
      out_ready = ($urandom % 100 < out_rate);
      #1;
      if (in_valid && in_ready) begin x.push_back(longint'(in_data)); n_sent++; end
      in_ready_q = in_ready;
      @(posedge clk);
    end
    @(negedge clk);
    run = 0; in_valid = 0;
  endtask

  initial begin
    run_config(1,   40,  90, 90);
    run_config(3,   600, 95, 90);   // input runs far ahead: the ring fills and stalls it
    run_config(24,  120, 50, 60);
    run_config(31,  80,  100, 30);
    run_config(128, 300, 80, 100);
    run_config(128, 40,  20, 100);  // input slower than the filter
    checks += 9;
    if (n_in_stall == 0)     begin failures++; $display("FAIL no input stall"); end
    if (n_out_bp == 0)       begin failures++; $display("FAIL no output back-pressure"); end
    if (n_wait_in == 0)      begin failures++; $display("FAIL never waited for input"); end
    if (n_zero == 0)         begin failures++; $display("FAIL no zero sample before x(0)"); end
    if (n_wrap == 0)         begin failures++; $display("FAIL register file never wrapped"); end
    if (n_pow2 == 0)         begin failures++; $display("FAIL no power-of-two coefficient"); end
    if (n_pos == 0)          begin failures++; $display("FAIL no positive split"); end
    if (n_nonpos == 0)       begin failures++; $display("FAIL no negative split"); end
    if (n_timed_blocks == 0) begin failures++; $display("FAIL no block timed"); end
    $display("mechanisms: in_stall=%0d out_backpressure=%0d wait_input=%0d zero_samples=%0d rf_wrap=%0d",
             n_in_stall, n_out_bp, n_wait_in, n_zero, n_wrap);
    $display("coefficients: pow2=%0d positive=%0d non_positive=%0d zero=%0d; timed blocks=%0d",
             n_pow2, n_pos, n_nonpos, n_hzero, n_timed_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: n_out=%0d n_sent=%0d state=%0d wr=%0d n0=%0d oldest=%0d in_ready=%0b", n_out, n_sent,
             dut.state, dut.wr_count, dut.n0, dut.oldest_needed, in_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
