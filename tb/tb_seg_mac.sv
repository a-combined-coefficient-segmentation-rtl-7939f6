// tb_seg_mac: drives random samples, accumulator values and coefficients split by the
// segmentation rule (recomputed here), and checks acc_out = acc_in + x*h, for both
// multiplier operand orders.
module tb_seg_mac;
  int checks = 0, failures = 0;

  logic signed [15:0] x;
  logic               neg;
  logic [3:0]         sh;
  logic [15:0]        m;
  logic signed [38:0] acc_in, out0, out1;

  seg_mac                      dut0 (.x(x), .s_neg(neg), .s_shamt(sh), .m(m), .acc_in(acc_in), .acc_out(out0));
  seg_mac #(.SWAP_INPUTS(1'b1)) dut1 (.x(x), .s_neg(neg), .s_shamt(sh), .m(m), .acc_in(acc_in), .acc_out(out1));

  initial begin
    longint h, a, s, i, exp;
    logic signed [38:0] wrapped;
    for (int t = 0; t < 20000; t++) begin
      h = longint'($signed(16'($urandom)));
      a = (h < 0) ? -h : h;
      i = 0;
      while ((longint'(1) << i) < a) i++;
      if ((longint'(1) << i) == a) begin s = h; sh = 4'(i); neg = (h < 0); end
      else if (h > 0)              begin s = longint'(1) << (i - 1); sh = 4'(i - 1); neg = 0; end
      else                         begin s = -(longint'(1) << i); sh = 4'(i); neg = 1; end
      m      = 16'(h - s);
      x      = 16'($urandom);
      acc_in = 39'({$urandom, $urandom}) >>> ($urandom % 12);
      #1;
      exp = longint'(acc_in) + longint'(x) * h;
      // the accumulator is 39 bits wide: compare modulo 2^39
      wrapped = exp[38:0];
      exp = longint'(wrapped);
      checks += 2;
      if (longint'(out0) != exp || longint'(out1) != exp) begin
        failures++;
        if (failures < 4) $display("FAIL h=%0d x=%0d acc=%0d got %0d/%0d exp %0d",
                                                 h, x, acc_in, out0, out1, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
