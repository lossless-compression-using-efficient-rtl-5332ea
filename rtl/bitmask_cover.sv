// bitmask_cover: finds the cheapest set of sliding bitmasks that records the
// difference between a word and a dictionary entry, in the n-1 bit encoding.
//
// `diff` is the XOR of the word and the entry. A mask is placed at the
// leftmost difference not yet covered, so its first bit is always 1 and only
// its size-1 following bits are kept (`stored`, right-aligned); bits past the
// end of the word count as 0. Every sequence of mask sizes with 1 to
// MAX_MASKS masks is tried, fewest masks first and, for each count, in the
// order of the sequence number (digit m of the number, base NUM_MASK_TYPES,
// is the size of mask m). A sequence succeeds when it leaves no difference
// uncovered and every mask starts on a difference. The successful sequence
// with the fewest mask bits wins; on a tie the first one tried.
//
// `ok` is low when the difference cannot be covered (or is zero).
// `mask_bits` is the length of the mask part of the codeword: the count
// field plus, per mask, its size selector, offset and stored bits.
// Combinational. The greedy left-to-right placement is this design's own way
// of choosing the masks.
module bitmask_cover
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  localparam int unsigned OFF_W    = $clog2(W),
  localparam int unsigned MAX_SIZE = (NUM_MASK_TYPES > 1) ? max2(MASK0_SIZE, MASK1_SIZE) : MASK0_SIZE,
  localparam int unsigned SM_W     = (MAX_SIZE > 1) ? MAX_SIZE - 1 : 1,
  localparam int unsigned NT       = (NUM_MASK_TYPES > 1) ? 2 : 1,
  localparam int unsigned CNT_W    = sel_width(MAX_MASKS),
  localparam int unsigned TYPE_W   = sel_width(NUM_MASK_TYPES),
  localparam int unsigned MB_W     = $clog2(CNT_W + MAX_MASKS * (TYPE_W + OFF_W + MAX_SIZE) + 1)
) (
  input  logic [W-1:0]      diff,
  output logic              ok,
  output logic [CNT_W:0]    count,
  output logic              mtype  [MAX_MASKS],
  output logic [OFF_W-1:0]  offset [MAX_MASKS],
  output logic [SM_W-1:0]   stored [MAX_MASKS],
  output logic [MB_W-1:0]   mask_bits
);

  // position (from the left) of the leftmost 1 of x; W when x is 0
  function automatic int unsigned lead_one(input logic [W-1:0] x);
    int unsigned p = W;
    for (int i = 0; i < int'(W); i++)
      if (x[i]) p = W - 1 - i;   // the last hit is the leftmost 1
    return p;
  endfunction

  function automatic int unsigned size_of(input logic t);
    return (NUM_MASK_TYPES > 1 && t) ? MASK1_SIZE : MASK0_SIZE;
  endfunction

  logic [W-1:0]     d;
  logic             good;
  int unsigned      p;
  int unsigned      s;
  int unsigned      k;
  int unsigned      bits;
  int unsigned      best_bits;
  logic             c_type   [MAX_MASKS];
  logic [OFF_W-1:0] c_offset [MAX_MASKS];
  logic [SM_W-1:0]  c_stored [MAX_MASKS];

  always_comb begin
    ok        = 1'b0;
    count     = '0;
    best_bits = '1;
    for (int m = 0; m < int'(MAX_MASKS); m++) begin
      mtype[m] = 1'b0; offset[m] = '0; stored[m] = '0;
      c_type[m] = 1'b0; c_offset[m] = '0; c_stored[m] = '0;
    end
    d = '0; good = 1'b0; p = 0; s = 0; k = 0; bits = 0;

    for (int unsigned n = 1; n <= MAX_MASKS; n++) begin
      for (int unsigned seq = 0; seq < NT ** n; seq++) begin
        d    = diff;
        good = 1'b1;
        bits = CNT_W;
        k    = seq;
        for (int unsigned m = 0; m < MAX_MASKS; m++) begin
          c_type[m] = 1'b0; c_offset[m] = '0; c_stored[m] = '0;
          if (m < n) begin
            c_type[m] = (k % NT) != 0;
            k         = k / NT;
            s         = size_of(c_type[m]);
            p         = lead_one(d);
            if (p >= W) good = 1'b0;
            c_offset[m] = OFF_W'(p);
            for (int unsigned j = 1; j < MAX_SIZE; j++) begin
              if (j < s) begin
                c_stored[m] = c_stored[m] << 1;
                if (p + j < W) c_stored[m][0] = d[W - 1 - (p + j)];
              end
            end
            for (int unsigned j = 0; j < MAX_SIZE; j++)
              if (j < s && p + j < W) d[W - 1 - (p + j)] = 1'b0;
            bits += TYPE_W + OFF_W + s - 1;
          end
        end
        if (good && d == '0 && bits < best_bits) begin
          ok        = 1'b1;
          best_bits = bits;
          count     = (CNT_W + 1)'(n);
          for (int m = 0; m < int'(MAX_MASKS); m++) begin
            mtype[m] = c_type[m]; offset[m] = c_offset[m]; stored[m] = c_stored[m];
          end
        end
      end
    end
    mask_bits = MB_W'(ok ? best_bits : 0);
  end

endmodule
