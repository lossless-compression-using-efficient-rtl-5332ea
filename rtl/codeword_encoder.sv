// codeword_encoder: packs the fields of one codeword into a left-aligned bit
// vector, the inverse of codeword_decoder.
//
// For an uncompressed word the output is 0 followed by the word; for a
// dictionary match 1 0 and the index; for a bitmasked word 1 1, count-1,
// then per mask its size selector, offset and size-1 stored bits, then the
// index. Fields are written most significant bit first and a field with one
// possible value takes no bits (see codeword_decoder for the widths). The
// first codeword bit is in the MSB of `bits`; all bits after the `len` bits
// of the codeword are 0. Combinational.
module codeword_encoder
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned DICT_DEPTH     = 512,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  localparam int unsigned MAX_CW   = max_cw_len(W, DICT_DEPTH, MAX_MASKS, NUM_MASK_TYPES,
                                                MASK0_SIZE, MASK1_SIZE),
  localparam int unsigned LEN_W    = $clog2(MAX_CW + 1),
  localparam int unsigned IDX_W    = $clog2(DICT_DEPTH),
  localparam int unsigned OFF_W    = $clog2(W),
  localparam int unsigned CNT_W    = sel_width(MAX_MASKS),
  localparam int unsigned TYPE_W   = sel_width(NUM_MASK_TYPES),
  localparam int unsigned MAX_SIZE = (NUM_MASK_TYPES > 1) ? max2(MASK0_SIZE, MASK1_SIZE) : MASK0_SIZE,
  localparam int unsigned SM_W     = (MAX_SIZE > 1) ? MAX_SIZE - 1 : 1
) (
  input  cw_kind_e          kind,
  input  logic [W-1:0]      raw,
  input  logic [IDX_W-1:0]  index,
  input  logic [CNT_W:0]    count,
  input  logic              mtype  [MAX_MASKS],
  input  logic [OFF_W-1:0]  offset [MAX_MASKS],
  input  logic [SM_W-1:0]   stored [MAX_MASKS],
  output logic [MAX_CW-1:0] bits,
  output logic [LEN_W-1:0]  len
);

  int unsigned pos;
  int unsigned size;

  // append the n low bits of v to the codeword
  function automatic logic [MAX_CW-1:0] put(input logic [MAX_CW-1:0] b, input int unsigned at,
                                            input logic [MAX_CW-1:0] v, input int unsigned n);
    logic [MAX_CW-1:0] field;
    if (n == 0) return b;
    field = v & ((MAX_CW'(1) << n) - MAX_CW'(1));
    return b | ((field << (MAX_CW - n)) >> at);
  endfunction

  always_comb begin
    bits = '0;
    pos  = 0;
    size = 0;
    case (kind)
      CW_RAW: begin
        bits = put(bits, pos, '0, 1);          pos += 1;
        bits = put(bits, pos, MAX_CW'(raw), W); pos += W;
      end
      CW_DICT: begin
        bits = put(bits, pos, MAX_CW'(2'b10), 2); pos += 2;
        bits = put(bits, pos, MAX_CW'(index), IDX_W); pos += IDX_W;
      end
      default: begin
        bits = put(bits, pos, MAX_CW'(2'b11), 2); pos += 2;
        bits = put(bits, pos, MAX_CW'(count - 1'b1), CNT_W); pos += CNT_W;
        for (int unsigned m = 0; m < MAX_MASKS; m++) begin
          if (m < count) begin
            size = (NUM_MASK_TYPES > 1 && mtype[m]) ? MASK1_SIZE : MASK0_SIZE;
            bits = put(bits, pos, MAX_CW'(mtype[m]), TYPE_W);   pos += TYPE_W;
            bits = put(bits, pos, MAX_CW'(offset[m]), OFF_W);   pos += OFF_W;
            bits = put(bits, pos, MAX_CW'(stored[m]), size - 1); pos += size - 1;
          end
        end
        bits = put(bits, pos, MAX_CW'(index), IDX_W); pos += IDX_W;
      end
    endcase
    len = LEN_W'(pos);
  end

endmodule
