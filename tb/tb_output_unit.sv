// tb_output_unit: captures random blocks and drains them with random out_ready. Checks
// the order (ACC_0 first), out_last on the last word, and busy.
module tb_output_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int L = 4;
  logic               capture, out_valid, out_ready, out_last, busy;
  logic signed [38:0] acc_in [L];
  logic signed [38:0] out_data;
  logic signed [38:0] q[$];
  int got = 0;

  output_unit #(.L(L)) dut (.clk, .rst_n, .capture, .acc_in, .out_valid, .out_ready, .out_data,
                            .out_last, .busy);

  initial begin
    capture = 0; out_ready = 0;
    foreach (acc_in[i]) acc_in[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      foreach (acc_in[i]) acc_in[i] = 39'({$urandom, $urandom});
      capture   = !busy && ($urandom % 3 == 0);
      out_ready = 1'($urandom);
      #1;
      checks++;
      if (busy !== (q.size() != 0)) failures++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0] || out_last !== (q.size() == 1)) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d exp %0d last=%0b", out_data, q[0], out_last);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) begin void'(q.pop_front()); got++; end
      if (capture) foreach (acc_in[i]) q.push_back(acc_in[i]);
    end
    checks++;
    if (got < 100) failures++;
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
