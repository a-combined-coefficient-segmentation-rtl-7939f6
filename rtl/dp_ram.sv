// dp_ram: simple dual-port memory, one write port and one read port, used for both the
// data memory (input samples) and the coefficient memory (segmented coefficients).
//
// How it works: an array of DEPTH words. A write with we = 1 stores wdata at waddr on the
// clock edge. A read with re = 1 returns mem[raddr] in rdata one clock later; rdata holds
// its value while re = 0, so the word last read stays on the bus. Reading and writing the
// same address in one cycle returns the old word.
// The filter's description names the two memories only; port count, latency and the
// hold-on-idle read bus are this design's choices. The array itself is not reset.
//
// Interface: clk, rst_n (clears only rdata); write: we, waddr, wdata; read: re, raddr ->
// rdata (1-cycle latency).
module dp_ram #(
  parameter int unsigned DW    = fir_pkg::W_DEF,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
