// tb_fir_workloads: the eight benchmark filter lengths at the three word lengths the filter
// was studied with (8, 16 and 24 bits), block size 2; W = 16 is the default build. Every
// output is checked, and the coefficient-operand transition count of the combined scheme
// is compared against conventional single-MAC filtering.
module tb_fir_workloads;
  bit d [3];
  int c [3], f [3];

  fir_bench #(.W(16), .L(2), .NMAX(128), .NSAMP(64)) u_w16 (.done(d[0]), .checks(c[0]), .failures(f[0]));
  fir_bench #(.W(8),  .L(2), .NMAX(128), .NSAMP(64)) u_w8  (.done(d[1]), .checks(c[1]), .failures(f[1]));
  fir_bench #(.W(24), .L(2), .NMAX(128), .NSAMP(64)) u_w24 (.done(d[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    wait (d[0] && d[1] && d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
