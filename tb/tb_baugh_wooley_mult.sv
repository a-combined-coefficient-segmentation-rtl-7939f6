// tb_baugh_wooley_mult: compares the Baugh-Wooley array with the signed product computed
// by the simulator: every pair of 8-bit operands, then random and corner 16-bit and
// 24-bit operands.
module tb_baugh_wooley_mult;
  int checks = 0, failures = 0;

  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [23:0] a24, b24;
  logic signed [47:0] p24;

  baugh_wooley_mult #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  baugh_wooley_mult           dut16 (.a(a16), .b(b16), .p(p16));
  baugh_wooley_mult #(.W(24)) dut24 (.a(a24), .b(b24), .p(p24));

  task automatic cmp(input longint got, input longint exp, input string tag);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        cmp(longint'(p8), longint'(x) * longint'(y), "w8");
      end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      if (t == 0) begin a16 = 16'h8000; b16 = 16'h8000; a24 = 24'h800000; b24 = 24'h800000; end
      if (t == 1) begin a16 = 16'h8000; b16 = 16'h7fff; a24 = 24'h7fffff; b24 = 24'h800000; end
      #1;
      cmp(longint'(p16), longint'(a16) * longint'(b16), "w16");
      cmp(longint'(p24), longint'(a24) * longint'(b24), "w24");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
