// Shared types and default sizes of the binary MAC datapath with partial-sum
// scaling accumulators.
//
// The defaults are the configuration with the smallest accumulator that the
// design targets: tile size 64, a 64x64 array (64 inputs, 64 output lanes),
// a 4-bit saturating accumulator and an effective partial-sum precision of
// 3 bits, i.e. partial sums scaled by 64/2^3 = 8 before accumulation.
package bnn_pkg;

  // Kind of accumulator adder.
  //   ACC_ORDINARY   : y <- (y + p) mod 2^a        (wraps on overflow)
  //   ACC_SATURATING : y <- clip(y + p, 0, 2^a-1)  (sticks at the maximum)
  typedef enum logic {
    ACC_ORDINARY   = 1'b0,
    ACC_SATURATING = 1'b1
  } acc_mode_e;

  localparam int unsigned TILE_SIZE    = 64;  // T: XNORs per lane, popcount width
  localparam int unsigned NUM_LANES    = 64;  // output channels computed in parallel
  localparam int unsigned ACC_WIDTH    = 4;   // a: accumulator precision
  localparam int unsigned PSUM_BITS    = 3;   // b: effective partial-sum precision
  localparam acc_mode_e   ACC_MODE     = ACC_SATURATING;

endpackage
