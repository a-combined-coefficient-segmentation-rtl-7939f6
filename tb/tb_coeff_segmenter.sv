// tb_coeff_segmenter: checks the coefficient split against a step-by-step model of the
// segmentation procedure, for every 8-bit coefficient and for random 16-bit ones.
// Checks per coefficient: s and m equal the model's, s + m = h, m >= 0, m < 2^(W-2)
// (or m = 1 for h = 0), and the power-of-two flag.
module tb_coeff_segmenter;
  int checks = 0, failures = 0;

  logic signed [7:0]  h8;
  logic               n8, p8;
  logic [2:0]         sh8;
  logic [7:0]         m8;
  logic signed [15:0] h16;
  logic               n16, p16;
  logic [3:0]         sh16;
  logic [15:0]        m16;

  coeff_segmenter #(.W(8))  dut8  (.h(h8),  .s_neg(n8),  .s_shamt(sh8),  .m(m8),  .is_pow2(p8));
  coeff_segmenter           dut16 (.h(h16), .s_neg(n16), .s_shamt(sh16), .m(m16), .is_pow2(p16));

  // Reference: walk i upwards until 2^i >= |h|, then apply the three cases.
  task automatic model(input longint h, output longint s, output longint m, output bit pow2);
    longint a, i;
    a = (h < 0) ? -h : h;
    i = 0;
    while ((longint'(1) << i) < a) i++;
    pow2 = ((longint'(1) << i) == a);
    if (pow2)        s = h;
    else if (h > 0)  s = longint'(1) << (i - 1);
    else             s = -(longint'(1) << i);
    m = h - s;
  endtask

  task automatic check(input longint h, input bit neg, input int shamt, input longint mval,
                       input bit pow2, input int w);
    longint s_exp, m_exp, s_dut;
    bit p_exp;
    model(h, s_exp, m_exp, p_exp);
    s_dut = neg ? -(longint'(1) << shamt) : (longint'(1) << shamt);
    checks++;
    if (s_dut != s_exp || mval != m_exp || pow2 != p_exp || s_dut + mval != h ||
        mval < 0 || (h != 0 && mval >= (longint'(1) << (w - 2)))) begin
      failures++;
      if (failures < 10)
        $display("FAIL h=%0d: s=%0d m=%0d pow2=%0b, expected s=%0d m=%0d pow2=%0b",
                 h, s_dut, mval, pow2, s_exp, m_exp, p_exp);
    end
  endtask

  initial begin
    for (int v = -128; v < 128; v++) begin
      h8 = 8'(v);
      #1;
      check(longint'(v), n8, int'(sh8), longint'(m8), p8, 8);
    end
    for (int t = 0; t < 20000; t++) begin
      h16 = 16'($urandom);
      if (t < 40) h16 = (t[0] ? -16'sd1 : 16'sd1) <<< (t / 2 % 16);  // all +/- powers of two
      #1;
      check(longint'(h16), n16, int'(sh16), longint'(m16), p16, 16);
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
