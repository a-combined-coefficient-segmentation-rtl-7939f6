// tb_control_unit: runs the controller against models of the data memory, coefficient
// memory and register file kept in this testbench. For every accumulator write it checks
// that the data register presented is x(n0 + j - k) (zero before x(0)) for accumulator j and
// the coefficient k last fetched; that coefficients are fetched from h(N-1) down to h(0);
// that each block makes exactly N*L accumulator writes after one clear; and that a block
// with no output wait takes N*L + N + L + 1 cycles. Input arrives at a random rate and the
// output side is busy at random, for several tap counts N (L = 3, NMAX = 8).
module tb_control_unit;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int L = 3, NMAX = 8, DEPTH = 16;
  logic        run, out_busy;
  logic [3:0]  num_taps;
  logic [31:0] wr_count, oldest_needed, n0;
  logic        coef_re, data_re, rf_ptr_clr, rf_load_en, rf_replace_en, zero_sample;
  logic        acc_clear, acc_we, out_capture;
  logic [2:0]  coef_raddr;
  logic [3:0]  data_raddr;
  logic [1:0]  rf_load_idx, rf_rd_off, acc_sel;
  ctrl_state_e state;

  control_unit #(.L(L), .NMAX(NMAX), .DEPTH(DEPTH)) dut (.*);

  function automatic logic signed [15:0] sample(input int i);
    return 16'(i * 37 + 11);
  endfunction

  logic signed [15:0] mem [DEPTH];
  logic signed [15:0] rdata, rf [L];
  int rf_ptr, k_cur, k_expect, mac_cnt, blk_cycles, out_wait, blocks;
  bit in_block;

  always @(posedge clk) if (rst_n) begin
    // models, updated with the controller's outputs of this cycle
    if (rf_ptr_clr) rf_ptr = 0;
    if (rf_load_en) rf[rf_load_idx] = zero_sample ? 16'sd0 : rdata;
    if (rf_replace_en) begin rf[rf_ptr] = zero_sample ? 16'sd0 : rdata; rf_ptr = (rf_ptr + 1) % L; end
    if (data_re) rdata = mem[data_raddr];
    if (acc_clear) begin
      checks++;
      if (in_block) failures++;
      in_block = 1; mac_cnt = 0; blk_cycles = 0; out_wait = 0; k_expect = int'(num_taps) - 1;
    end
    if (in_block) blk_cycles++;
    if (state == ST_OUT) out_wait++;
    if (coef_re) begin
      checks++;
      if (int'(coef_raddr) != k_expect) begin
        failures++;
        $display("FAIL coefficient order: read %0d expected %0d", coef_raddr, k_expect);
      end
      k_expect--;
    end
    if (acc_we) begin
      int idx;
      logic signed [15:0] expv, got;
      idx  = int'(n0) + int'(acc_sel) - k_cur;
      expv = (idx < 0) ? 16'sd0 : sample(idx);
      got  = rf[(rf_ptr + int'(rf_rd_off)) % L];
      checks++;
      if (got !== expv || acc_sel != rf_rd_off) begin
        failures++;
        if (failures < 10) $display("FAIL n0=%0d k=%0d j=%0d: register %0d expected %0d",
                                    n0, k_cur, acc_sel, got, expv);
      end
      mac_cnt++;
    end
    if (coef_re) k_cur = int'(coef_raddr);   // coefficient register loads now
    if (out_capture) begin
      checks += 2;
      if (mac_cnt != int'(num_taps) * L) failures++;
      if (out_wait == 1 && blk_cycles != int'(num_taps) * L + int'(num_taps) + L + 1) begin
        failures++;
        $display("FAIL block took %0d cycles", blk_cycles);
      end
      in_block = 0; blocks++;
    end
  end

  int unsigned avail;
  initial begin
    int taps [4] = '{1, 2, 5, 8};
    for (int cfg = 0; cfg < 4; cfg++) begin
      rst_n = 0; run = 0; out_busy = 0; wr_count = 0; num_taps = 4'(taps[cfg]);
      avail = 0; in_block = 0; blocks = 0; rf_ptr = 0; k_cur = 0; rdata = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      while (blocks < 30) begin
        @(negedge clk);
        run = ($urandom % 8 != 0);
        out_busy = ($urandom % 3 == 0);
        if (($urandom % 2 == 0) && (avail - oldest_needed) < DEPTH) begin
          mem[avail % DEPTH] = sample(int'(avail));
          avail++;
        end
        wr_count = avail;
      end
    end
    checks++;  // all blocks finished
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
