// tb_fir_bs_variants: the filter at the other sizes it was studied with: 8-bit words with
// block size 4, 24-bit words with block size 16 and swapped multiplier operands, 16-bit
// words with block size 8 (swapped) and with block size 3 (the worked example's block
// size). Each runs some of the benchmark filter lengths end to end.
module tb_fir_bs_variants;
  bit d [4];
  int c [4], f [4];

  fir_bench #(.W(8),  .L(4),  .NMAX(64),                    .FIRST(3), .LAST(4), .NSAMP(48)) u_w8  (.done(d[0]), .checks(c[0]), .failures(f[0]));
  fir_bench #(.W(24), .L(16), .NMAX(128), .SWAP_INPUTS(1'b1), .FIRST(7), .LAST(7), .NSAMP(48)) u_w24 (.done(d[1]), .checks(c[1]), .failures(f[1]));
  fir_bench #(.W(16), .L(8),  .NMAX(32),  .SWAP_INPUTS(1'b1), .FIRST(0), .LAST(1), .NSAMP(48)) u_l8  (.done(d[2]), .checks(c[2]), .failures(f[2]));
  fir_bench #(.W(16), .L(3),  .NMAX(32),                    .FIRST(6), .LAST(6), .NSAMP(48)) u_l3  (.done(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
