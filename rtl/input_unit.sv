// input_unit: accepts the input sample stream and writes it into the data memory.
//
// How it works: sample x(n) is written at data-memory address n mod DEPTH, n counting
// from 0 after reset (wr_count is the index the next sample will get). The data memory is
// a ring, so a new sample must not overwrite one the filter still needs: the controller
// reports the index of the oldest sample it still needs (oldest_needed), and in_ready
// drops (the source is stalled) while wr_count - oldest_needed reaches DEPTH.
// The filter's description names an input unit only; this ring-buffer organisation and the
// valid/ready handshake are this design's choices.
//
// Interface: clk, rst_n; in_valid, in_data, in_ready (a sample moves when valid and ready
// are both high at a clock edge); oldest_needed; mem_we, mem_waddr, mem_wdata to the data
// memory's write port (same cycle as the handshake); wr_count.
module input_unit #(
  parameter int unsigned W     = fir_pkg::W_DEF,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DAW   = $clog2(DEPTH),
  parameter int unsigned IDX_W = fir_pkg::IDX_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [W-1:0]       in_data,
  output logic               in_ready,
  input  logic [IDX_W-1:0]   oldest_needed,
  output logic               mem_we,
  output logic [DAW-1:0]     mem_waddr,
  output logic [W-1:0]       mem_wdata,
  output logic [IDX_W-1:0]   wr_count
);

  logic [IDX_W-1:0] fill;  // samples held that are still needed, modulo 2^IDX_W

  assign fill      = wr_count - oldest_needed;
  assign in_ready  = (fill < IDX_W'(DEPTH));
  assign mem_we    = in_valid && in_ready;
  assign mem_waddr = wr_count[DAW-1:0];
  assign mem_wdata = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      wr_count <= '0;
    else if (mem_we) wr_count <= wr_count + 1'b1;
  end

endmodule
