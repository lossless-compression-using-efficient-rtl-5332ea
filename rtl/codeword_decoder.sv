// codeword_decoder: parses the codeword at the head of the compressed stream.
//
// `head` holds the next MAX_CW bits of the stream, first bit in the MSB, and
// `avail` says how many of them are valid. The codeword format is
//
//   uncompressed : 0 | word (W bits)
//   dictionary   : 1 | 0 | index (IDX_W bits)
//   bitmasked    : 1 | 1 | count-1 (CNT_W) | {type (TYPE_W) | offset (OFF_W)
//                  | mask bits (size-1)} x count | index (IDX_W)
//
// with IDX_W = log2(DICT_DEPTH), OFF_W = log2(W), CNT_W = log2(MAX_MASKS) and
// TYPE_W = log2(NUM_MASK_TYPES); a field with one possible value takes no
// bits. Each bitmask is stored with one bit fewer than its size: the offset
// points at the first differing bit, whose 1 is implied (see bitmask_expand).
// The field order follows the bitmask-compression format; the count and type
// encodings are this design's own choice.
//
// Outputs: the codeword kind and length, the raw word, the dictionary index
// and the XOR of all bitmask patterns. `ok` is high when the whole codeword
// is inside the valid bits. Every field that decides the length lies before
// the end of the codeword, so a length that is <= avail was computed from
// valid bits only. Purely combinational.
module codeword_decoder
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
  input  logic [MAX_CW-1:0] head,
  input  logic [LEN_W-1:0]  avail,
  output logic              ok,
  output cw_kind_e          kind,
  output logic [LEN_W-1:0]  len,
  output logic [W-1:0]      raw,
  output logic [IDX_W-1:0]  index,
  output logic [W-1:0]      xor_pat
);

  // the w bits of h starting at bit pos (counted from the MSB), right-aligned
  function automatic logic [MAX_CW-1:0] field(input logic [MAX_CW-1:0] h,
                                               input int unsigned pos,
                                               input int unsigned w);
    if (w == 0) return '0;
    return (h << pos) >> (MAX_CW - w);
  endfunction

  logic             m_type   [MAX_MASKS];
  logic [OFF_W-1:0] m_offset [MAX_MASKS];
  logic [SM_W-1:0]  m_stored [MAX_MASKS];
  logic [W-1:0]     m_pat    [MAX_MASKS];
  logic [MAX_MASKS-1:0] m_used;

  for (genvar i = 0; i < MAX_MASKS; i++) begin : g_mask
    bitmask_expand #(
      .W(W), .NUM_MASK_TYPES(NUM_MASK_TYPES),
      .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE)
    ) u_expand (
      .mask_type(m_type[i]), .offset(m_offset[i]), .stored(m_stored[i]),
      .pattern(m_pat[i])
    );
  end

  int unsigned pos;
  int unsigned count;
  int unsigned size;

  always_comb begin
    raw     = head[MAX_CW-2 -: W];
    pos     = 0;
    count   = 0;
    size    = 0;
    m_used  = '0;
    for (int i = 0; i < MAX_MASKS; i++) begin
      m_type[i]   = 1'b0;
      m_offset[i] = '0;
      m_stored[i] = '0;
    end

    if (!head[MAX_CW-1]) begin
      kind = CW_RAW;
      pos  = 1 + W;
    end else if (!head[MAX_CW-2]) begin
      kind = CW_DICT;
      pos  = 2;
    end else begin
      kind  = CW_MASKED;
      pos   = 2;
      count = int'(field(head, pos, CNT_W)) + 1;
      if (count > MAX_MASKS) count = MAX_MASKS;
      pos  += CNT_W;
      for (int i = 0; i < MAX_MASKS; i++) begin
        if (i < count) begin
          m_used[i]   = 1'b1;
          m_type[i]   = field(head, pos, TYPE_W) != '0;
          pos        += TYPE_W;
          m_offset[i] = OFF_W'(field(head, pos, OFF_W));
          pos        += OFF_W;
          size        = (NUM_MASK_TYPES > 1 && m_type[i]) ? MASK1_SIZE : MASK0_SIZE;
          m_stored[i] = SM_W'(field(head, pos, size - 1));
          pos        += size - 1;
        end
      end
    end

    if (kind != CW_RAW) begin
      index = IDX_W'(field(head, pos, IDX_W));
      pos  += IDX_W;
    end else begin
      index = '0;
    end

    len = LEN_W'(pos);
    ok  = pos <= int'(avail);
  end

  // the patterns of all bitmasks in use are combined into one XOR pattern
  always_comb begin
    xor_pat = '0;
    for (int i = 0; i < MAX_MASKS; i++)
      if (m_used[i]) xor_pat ^= m_pat[i];
  end

endmodule
