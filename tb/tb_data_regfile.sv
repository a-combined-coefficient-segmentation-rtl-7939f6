// tb_data_regfile: loads a block, then replaces the oldest sample many times, comparing
// every read-by-age against a queue that keeps the samples oldest first. Run for L = 3
// (the worked example's block size) and L = 4.
module tb_data_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int L = 3;
  logic              ptr_clr, load_en, replace_en;
  logic [1:0]        load_idx, rd_off, ptr;
  logic signed [15:0] wdata, rd_data;
  logic signed [15:0] q[$];

  data_regfile #(.L(L)) dut (.clk, .rst_n, .ptr_clr, .load_en, .load_idx, .replace_en,
                             .wdata, .rd_off, .rd_data, .ptr);

  task automatic check_all();
    for (int o = 0; o < L; o++) begin
      rd_off = 2'(o);
      #1;
      checks++;
      if (rd_data !== q[o]) begin
        failures++;
        if (failures < 10) $display("FAIL off=%0d got %0d exp %0d ptr=%0d", o, rd_data, q[o], ptr);
      end
    end
  endtask

  initial begin
    ptr_clr = 0; load_en = 0; replace_en = 0; load_idx = 0; rd_off = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      q.delete();
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        ptr_clr = (i == 0); load_en = 1; load_idx = 2'(i); wdata = 16'($urandom);
        q.push_back(wdata);
      end
      @(negedge clk); load_en = 0; ptr_clr = 0;
      check_all();
      for (int u = 0; u < 1 + blk; u++) begin
        @(negedge clk);
        replace_en = 1; wdata = 16'($urandom);
        void'(q.pop_front()); q.push_back(wdata);
        @(negedge clk); replace_en = 0;
        check_all();
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
