// data_regfile: the register file R_0..R_{L-1} that holds one block of L data samples.
//
// How it works: the registers form a circular buffer with a pointer to the oldest sample.
// At the start of a block the controller fills R_0..R_{L-1} in order (load_en, load_idx)
// and clears the pointer (ptr_clr), so R_0 holds the oldest sample. For every further
// coefficient one new sample replaces the oldest one (replace_en) and the pointer steps to
// the next register, wrapping from R_{L-1} to R_0. Reads are by age: rd_off = 0 gives the
// oldest sample, rd_off = L-1 the newest, so the read order after each update is
// R_{p}, R_{p+1}, ..., R_{p-1} in a circular manner, as the filter's description asks.
// Writing the new sample over the oldest follows the description; the pointer and the
// age-based read port are this design's way of doing it.
//
// Interface: clk, rst_n; ptr_clr; load_en, load_idx; replace_en; wdata; rd_off -> rd_data
// (combinational read); ptr (current oldest position, for observation).
module data_regfile #(
  parameter int unsigned W  = fir_pkg::W_DEF,
  parameter int unsigned L  = fir_pkg::L_DEF,
  parameter int unsigned LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ptr_clr,
  input  logic                load_en,
  input  logic [LW-1:0]       load_idx,
  input  logic                replace_en,
  input  logic signed [W-1:0] wdata,
  input  logic [LW-1:0]       rd_off,
  output logic signed [W-1:0] rd_data,
  output logic [LW-1:0]       ptr
);

  logic signed [W-1:0] r [L];

  // Position of the register that is `off` places younger than the oldest one.
  function automatic logic [LW-1:0] wrap_add(input logic [LW-1:0] base, input logic [LW-1:0] off);
    logic [LW:0] s;
    s = {1'b0, base} + {1'b0, off};
    if (s >= (LW+1)'(L)) s = s - (LW+1)'(L);
    return s[LW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int i = 0; i < L; i++) r[i] <= '0;
    end else begin
      if (load_en)    r[load_idx] <= wdata;
      if (replace_en) r[ptr]      <= wdata;
      if (ptr_clr)         ptr <= '0;
      else if (replace_en) ptr <= wrap_add(ptr, LW'(1));
    end
  end

  assign rd_data = r[wrap_add(ptr, rd_off)];

endmodule
