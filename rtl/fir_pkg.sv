// fir_pkg: constants and types shared by the block-processing, coefficient-segmented
// FIR filter.
//
// Default sizes: 16-bit data and coefficients (the middle of the three multiplier sizes the
// filter was studied with, and the one used for the per-bit switching study), block size L = 2
// (the block size that gave the largest saving), and room for up to 128 taps (the longest
// of the benchmark filters). The controller state type lives here so that testbenches can
// name the states.
package fir_pkg;

  localparam int unsigned W_DEF    = 16;   // data and coefficient word length
  localparam int unsigned L_DEF    = 2;    // block size: outputs produced per block
  localparam int unsigned NMAX_DEF = 128;  // largest number of taps the memories hold

  // Sample indices are free-running modulo 2^32 counters.
  localparam int unsigned IDX_W = 32;

  // Controller states, in the order a block passes through them.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,  // wait for L new samples; clear accumulators, fetch first coefficient
    ST_LOAD = 3'd1,  // fill R_0..R_{L-1} with the first data block
    ST_MAC  = 3'd2,  // one shift-multiply-accumulate per data register
    ST_UPD  = 3'd3,  // next coefficient arrives, oldest data register replaced
    ST_OUT  = 3'd4   // hand the L results to the output unit
  } ctrl_state_e;

endpackage
