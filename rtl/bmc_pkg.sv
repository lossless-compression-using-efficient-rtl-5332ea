// bmc_pkg: types shared by the bitmask-based decompressor.
//
// A compressed stream is a sequence of codewords, first bit first (MSB
// first). Each codeword starts with an isCompressed bit; a compressed
// codeword then has an isBitmasked bit. That gives the three codeword kinds
// below. The field order (isCompressed, isBitmasked, number of bitmasks,
// offset/mask pairs, dictionary index) follows the bitmask-based compression
// format; the exact bit widths are set by the parameters of the modules.
package bmc_pkg;

  typedef enum logic [1:0] {
    CW_RAW    = 2'd0,  // '0' + W uncompressed bits
    CW_DICT   = 2'd1,  // '1' '0' + dictionary index
    CW_MASKED = 2'd2   // '1' '1' + count + bitmasks + dictionary index
  } cw_kind_e;

  // Width of a field that selects one of n values; 0 when n <= 1, so that a
  // field with a single possible value takes no bits in the stream.
  function automatic int unsigned sel_width(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  function automatic int unsigned max2(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Length in bits of the longest codeword for a given configuration: the
  // larger of an uncompressed word (1 + w) and a codeword carrying the most
  // bitmasks, each of the largest size stored in size-1 bits.
  function automatic int unsigned max_cw_len(
      input int unsigned w, input int unsigned dict_depth,
      input int unsigned max_masks, input int unsigned num_mask_types,
      input int unsigned mask0_size, input int unsigned mask1_size);
    int unsigned max_size;
    int unsigned masked;
    max_size = (num_mask_types > 1) ? max2(mask0_size, mask1_size) : mask0_size;
    masked   = 2 + sel_width(max_masks)
             + max_masks * (sel_width(num_mask_types) + $clog2(w) + max_size - 1)
             + sel_width(dict_depth);
    return max2(1 + w, masked);
  endfunction

endpackage
