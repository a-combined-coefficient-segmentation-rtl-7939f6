// tb_acc_bank: random clear / write operations against a model; checks every accumulator
// and the selected-read port after each cycle.
module tb_acc_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int L = 4;
  logic               clear, we;
  logic [1:0]         sel;
  logic signed [38:0] d, rd_data;
  logic signed [38:0] acc [L];
  logic signed [38:0] model [L];

  acc_bank #(.L(L)) dut (.clk, .rst_n, .clear, .we, .sel, .d, .rd_data, .acc);

  initial begin
    clear = 0; we = 0; sel = 0; d = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear = ($urandom % 16 == 0); we = 1'($urandom); sel = 2'($urandom);
      d = 39'({$urandom, $urandom});
      #1;
      checks++;
      if (rd_data !== model[sel]) failures++;
      @(posedge clk);
      if (clear) foreach (model[i]) model[i] = 0;
      else if (we) model[sel] = d;
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (acc[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d acc[%0d]=%0d exp %0d", t, i, acc[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
