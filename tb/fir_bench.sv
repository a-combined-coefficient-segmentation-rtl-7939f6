// fir_bench: testbench helper that runs one build of fir_bs_top over a range of the eight
// benchmark filter lengths (24, 32, 50, 31, 55, 32, 20, 128 taps).
//
// For each filter it computes a coefficient set of that length and kind (low-pass,
// band-pass, band-stop, five-band, differentiator, Hilbert transformer) with a windowed
// ideal response, h[n] = w[n] * h_ideal[n - (N-1)/2], Hamming window, scaled so that the
// largest coefficient is 2^(W-1) - 1 and rounded; these stand in for equiripple designs of
// the same lengths. It streams NSAMP zero-mean uniform random W-bit samples, checks every
// output against direct convolution, and counts bit transitions at the multiplier's
// coefficient operand (m) against those of a conventional single-MAC filter whose
// coefficient operand steps through h(0) .. h(N-1) for every output. The checks are that the
// combined scheme switches the coefficient operand less, and that its two top bits never
// switch (m < 2^(W-2)). For the 32-tap band-pass filter the transitions are also printed
// bit by bit. Filters longer than NMAX are
// skipped. Reports checks and failures through its ports and sets done at the end.
module fir_bench #(
  parameter int unsigned W           = 16,
  parameter int unsigned L           = 2,
  parameter int unsigned NMAX        = 128,
  parameter bit          SWAP_INPUTS = 1'b0,
  parameter int          FIRST       = 0,
  parameter int          LAST        = 7,
  parameter int          NSAMP       = 64
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int AW = 2 * W + $clog2(NMAX), NW = $clog2(NMAX + 1), CAW = $clog2(NMAX);
  localparam real PI = 3.14159265358979;
  localparam int LEN [8] = '{24, 32, 50, 31, 55, 32, 20, 128};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 run, coef_we, in_valid, in_ready, out_valid, out_ready, out_last, busy;
  logic [NW-1:0]        num_taps;
  logic [CAW-1:0]       coef_waddr;
  logic signed [W-1:0]  coef_wdata, in_data;
  logic signed [AW-1:0] out_data;

  fir_bs_top #(.W(W), .L(L), .NMAX(NMAX), .SWAP_INPUTS(SWAP_INPUTS)) dut (.*);

  // ideal impulse responses; d = n - (N-1)/2
  function automatic real lp(input real fc, input real d);   // fc in cycles/sample
    return (d == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * d) / (PI * d);
  endfunction
  function automatic real ideal(input int f, input real d);
    case (f)
      0: return lp(0.20, d);                                   // low-pass
      1: return lp(0.30, d) - lp(0.15, d);                     // band-pass
      2: return lp(0.35, d) - lp(0.10, d);                     // band-pass
      3: return ((d == 0.0) ? 1.0 : 0.0) - (lp(0.30, d) - lp(0.15, d)); // band-stop
      4: return lp(0.08, d) + lp(0.40, d) - lp(0.25, d);        // five-band
      5: return (d == 0.0) ? 0.0 : ($cos(PI * d) / d - $sin(PI * d) / (PI * d * d)); // differentiator
      6: return (d == 0.0) ? 0.0 : (1.0 - $cos(PI * d)) / (PI * d);                  // Hilbert
      default: return lp(0.22, d) - lp(0.12, d);               // band-pass
    endcase
  endfunction

  longint h [NMAX];
  longint x [$];
  int     n_out, taps;
  longint tog_bs;
  longint bit_bs [W], bit_conv [W];
  logic [W-1:0] m_prev;

  always @(posedge clk) if (rst_n && busy) begin
    tog_bs += $countones(dut.u_mac.m ^ m_prev);
    for (int b = 0; b < W; b++) if (dut.u_mac.m[b] != m_prev[b]) bit_bs[b]++;
    m_prev = dut.u_mac.m;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint exp;
    logic signed [AW-1:0] e;
    exp = 0;
    for (int k = 0; k < taps; k++) if (n_out - k >= 0) exp += h[k] * x[n_out - k];
    e = AW'(exp);
    checks++;
    if (out_data != e) begin
      failures++;
      if (failures < 5) $display("FAIL W=%0d L=%0d N=%0d y(%0d) = %0d, expected %0d", W, L, taps, n_out, out_data, e);
    end
    n_out++;
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int f = FIRST; f <= LAST; f++) begin
      real hr [NMAX];
      real mx, sc;
      longint tog_conv;
      logic [W-1:0] hp, hw;
      if (LEN[f] > int'(NMAX)) continue;
      taps = LEN[f];
      mx = 0.0;
      for (int n = 0; n < taps; n++) begin
        real d;
        d = real'(n) - real'(taps - 1) / 2.0;
        hr[n] = ideal(f, d) * (0.54 - 0.46 * $cos(2.0 * PI * n / (taps - 1)));
        if (hr[n] > mx) mx = hr[n];
        if (-hr[n] > mx) mx = -hr[n];
      end
      sc = real'((longint'(1) << (W - 1)) - 1) / mx;
      for (int n = 0; n < taps; n++) h[n] = longint'($rtoi(hr[n] * sc + ((hr[n] >= 0.0) ? 0.5 : -0.5)));
      // conventional coefficient-operand transitions: h(0..N-1) once per output
      tog_conv = 0;
      for (int b = 0; b < W; b++) begin bit_conv[b] = 0; bit_bs[b] = 0; end
      hp = W'(h[taps - 1]);
      for (int o = 0; o < NSAMP; o++)
        for (int k = 0; k < taps; k++) begin
          hw = W'(h[k]);
          tog_conv += $countones(hw ^ hp);
          for (int b = 0; b < W; b++) if (hw[b] != hp[b]) bit_conv[b]++;
          hp = W'(h[k]);
        end

      rst_n = 0; run = 0; coef_we = 0; in_valid = 0; out_ready = 1; in_data = 0;
      coef_waddr = 0; coef_wdata = 0; num_taps = NW'(taps);
      n_out = 0; x.delete(); tog_bs = 0; m_prev = '0;
      for (int b = 0; b < W; b++) bit_bs[b] = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      for (int k = 0; k < taps; k++) begin
        @(negedge clk);
        coef_we = 1; coef_waddr = CAW'(k); coef_wdata = W'(h[k]);
      end
      @(negedge clk);
      coef_we = 0; run = 1;
      m_prev = dut.u_mac.m;
      while (n_out < NSAMP) begin
        @(negedge clk);
        if (!(in_valid && !in_ready)) begin
          in_valid = (x.size() < NSAMP);
          in_data  = W'($urandom);
        end
        #1;
        if (in_valid && in_ready) x.push_back(longint'(in_data));
      end
      @(negedge clk);
      run = 0; in_valid = 0;
      checks += 2;
      if (tog_bs >= tog_conv) failures++;
      if (bit_bs[W-1] != 0 || bit_bs[W-2] != 0) failures++;
      if (f == 1) begin
        $display("W=%0d L=%0d filter 2 (N=32), transitions per output by coefficient bit (conventional / combined):", W, L);
        for (int b = 0; b < W; b++)
          $display("  b%0d: %0.2f / %0.2f", b, real'(bit_conv[b]) / NSAMP, real'(bit_bs[b]) / NSAMP);
      end
      $display("W=%0d L=%0d filter %0d (N=%0d): coefficient-input transitions per output: conventional %0.2f, combined %0.2f",
               W, L, f + 1, taps, real'(tog_conv) / NSAMP, real'(tog_bs) / NSAMP);
    end
    done = 1;
  end
endmodule
