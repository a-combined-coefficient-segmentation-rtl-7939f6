// tb_dp_ram: random writes and reads against an array model. Checks the one-cycle read
// latency, that rdata holds while re = 0, and read-before-write on a same-address
// collision.
module tb_dp_ram;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        we, re;
  logic [5:0]  waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [64];
  logic [11:0] exp_q;

  dp_ram #(.DW(12), .DEPTH(64)) dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every word
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = 12'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = 12'($urandom);
      re = 1'($urandom); raddr = (t % 5 == 0) ? waddr : 6'($urandom);
      if (re) exp_q = model[raddr];       // old word on a collision
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d raddr=%0d rdata=%h exp=%h", t, raddr, rdata, exp_q);
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
