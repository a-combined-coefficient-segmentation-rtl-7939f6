// tb_pow2_shifter: checks x * (+/-2^shamt) for random samples and every shift amount.
module tb_pow2_shifter;
  int checks = 0, failures = 0;

  logic signed [15:0] x;
  logic               neg;
  logic [3:0]         sh;
  logic signed [31:0] y;

  pow2_shifter dut (.x(x), .neg(neg), .shamt(sh), .y(y));

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x   = 16'($urandom);
      if (t < 64) x = t[0] ? 16'sh8000 : 16'sh7fff;
      neg = 1'($urandom);
      sh  = 4'(t);
      #1;
      checks++;
      if (longint'(y) != longint'(x) * (neg ? -(longint'(1) << sh) : (longint'(1) << sh))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d neg=%0b sh=%0d y=%0d", x, neg, sh, y);
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
