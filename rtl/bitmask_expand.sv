// bitmask_expand: rebuilds the W-bit difference pattern of one bitmask.
//
// An n-bit bitmask records n consecutive bit differences between an input
// word and a dictionary entry. Because the offset is free to slide to any bit
// position, it can always be chosen so that it points at the first (leftmost)
// differing bit, which is therefore always 1 and need not be stored. Only the
// n-1 bits that follow it are kept in the stream. This module puts the
// implicit 1 back in front of those bits, and places the n-bit result at the
// offset, counted from the left (most significant) end of the word. Bits that
// would fall past the right end of the word are dropped, which lets a mask
// near the end of the word cover a difference in its last bits.
//
// Two bitmask sizes are supported, selected by mask_type (0: MASK0_SIZE,
// 1: MASK1_SIZE); with NUM_MASK_TYPES = 1 mask_type is ignored. The stored
// bits arrive right-aligned in `stored`; for a size-n mask only the n-1 low
// bits are used. The module is purely combinational.
module bitmask_expand
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  localparam int unsigned OFF_W         = $clog2(W),
  localparam int unsigned MAX_SIZE      = (NUM_MASK_TYPES > 1) ? max2(MASK0_SIZE, MASK1_SIZE) : MASK0_SIZE,
  localparam int unsigned SM_W          = (MAX_SIZE > 1) ? MAX_SIZE - 1 : 1
) (
  input  logic             mask_type,
  input  logic [OFF_W-1:0] offset,
  input  logic [SM_W-1:0]  stored,
  output logic [W-1:0]     pattern
);

  int unsigned size;
  logic [W-1:0] tail_mask;
  logic [W-1:0] mask_bits;

  always_comb begin
    size      = (NUM_MASK_TYPES > 1 && mask_type) ? MASK1_SIZE : MASK0_SIZE;
    // keep the size-1 stored bits, then put the implicit 1 in front of them
    tail_mask = (W'(1) << (size - 1)) - W'(1);
    mask_bits = (W'(stored) & tail_mask) | (W'(1) << (size - 1));
    // left-align the n-bit mask, then slide it right by the offset
    pattern   = (mask_bits << (W - size)) >> offset;
  end

endmodule
