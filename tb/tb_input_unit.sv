// tb_input_unit: offers samples every cycle while a consumer advances oldest_needed at
// random. Checks the memory write address and data of every accepted sample, that
// in_ready is low exactly when the ring is full, and that stalls really occur.
module tb_input_unit;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 16;
  logic        in_valid, in_ready, mem_we;
  logic [15:0] in_data, mem_wdata;
  logic [31:0] oldest_needed, wr_count;
  logic [3:0]  mem_waddr;
  int unsigned written = 0;

  input_unit #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .oldest_needed,
                                   .mem_we, .mem_waddr, .mem_wdata, .wr_count);

  initial begin
    in_valid = 0; in_data = 0; oldest_needed = 32'hFFFF_FFF9;  // a start before index 0
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_data  = 16'($urandom);
      if ($urandom % 3 == 0 && (written - oldest_needed) > 0) oldest_needed = oldest_needed + 1;
      #1;
      checks++;
      if (in_ready !== ((written - oldest_needed) < DEPTH)) failures++;
      if (in_valid && !in_ready) stalls++;
      checks++;
      if (mem_we !== (in_valid && in_ready)) failures++;
      if (mem_we) begin
        checks++;
        if (mem_waddr !== 4'(written) || mem_wdata !== in_data) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d exp %0d", mem_waddr, 4'(written));
        end
      end
      @(posedge clk);
      if (in_valid && in_ready) written++;
      #1;
      checks++;
      if (wr_count !== written) failures++;
    end
    checks++;
    if (stalls == 0) failures++;
    $display("stalls=%0d", stalls);
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
