// bmc_decompressor: decompression engine for bitmask-based dictionary
// compression with the n-1 bit bitmask encoding.
//
// Each original W-bit word is stored either uncompressed, as an index into a
// dictionary of frequent words, or as an index plus up to MAX_MASKS bitmasks
// that flip a few consecutive bits of the dictionary entry. A bitmask of n bits
// is stored in n-1 bits next to a sliding offset that points at its first
// differing bit (see bitmask_expand and codeword_decoder for the format).
//
// Structure: bit_buffer collects IN_W-bit words of the compressed stream and
// presents its head to codeword_decoder. When a whole codeword is in the
// buffer and the output stage is free, the codeword is consumed, the
// dictionary (synchronous read) is addressed with its index, and the raw
// word, the combined XOR pattern and the kind are registered. In the next
// cycle the output is the raw word, or the dictionary entry XORed with the
// pattern. So the latency from a complete codeword in the buffer to its word
// on the output is one clock, and one word can be produced per clock as long
// as the stream supplies the bits (IN_W bits per clock; a codeword longer
// than IN_W, such as an uncompressed word, costs an extra input clock).
//
// Interfaces: dictionary write port (dict_we/dict_waddr/dict_wdata), to be
// used before a stream is decoded; compressed input and decompressed output,
// both valid/ready (data must stay stable while valid is high and ready is
// low); `clear` empties the input buffer and the output stage between
// streams. out_kind tells which kind of codeword produced the output word.
// Reset is asynchronous, active low.
//
// Defaults are the code-compression configuration: 32-bit words, a
// 512-entry dictionary and two sliding bitmasks, 2 and 3 bits wide. The input
// width, the pipeline and the handshakes are this design's own choices.
module bmc_decompressor
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned DICT_DEPTH     = 512,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  parameter int unsigned IN_W           = 32,
  localparam int unsigned MAX_CW = max_cw_len(W, DICT_DEPTH, MAX_MASKS, NUM_MASK_TYPES,
                                              MASK0_SIZE, MASK1_SIZE),
  localparam int unsigned LEN_W  = $clog2(MAX_CW + 1),
  localparam int unsigned IDX_W  = $clog2(DICT_DEPTH),
  localparam int unsigned BUF_W  = MAX_CW + 2 * IN_W - 1,
  localparam int unsigned FILL_W = $clog2(BUF_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  // dictionary load
  input  logic             dict_we,
  input  logic [IDX_W-1:0] dict_waddr,
  input  logic [W-1:0]     dict_wdata,
  // compressed stream in
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  // decompressed words out
  output logic             out_valid,
  input  logic             out_ready,
  output logic [W-1:0]     out_data,
  output cw_kind_e         out_kind
);

  logic [MAX_CW-1:0] head;
  logic [FILL_W-1:0] fill;
  logic [LEN_W-1:0]  avail;
  logic              dec_ok;
  cw_kind_e          dec_kind;
  logic [LEN_W-1:0]  dec_len;
  logic [W-1:0]      dec_raw;
  logic [IDX_W-1:0]  dec_index;
  logic [W-1:0]      dec_xor;
  logic              take;

  logic              s1_valid;
  cw_kind_e          s1_kind;
  logic [W-1:0]      s1_raw;
  logic [W-1:0]      s1_xor;
  logic [W-1:0]      dict_q;

  bit_buffer #(.IN_W(IN_W), .HEAD_W(MAX_CW), .BUF_W(BUF_W)) u_buffer (
    .clk, .rst_n, .clear,
    .in_valid, .in_ready, .in_data,
    .head, .fill,
    .consume(take), .consume_len(dec_len)
  );

  assign avail = (32'(fill) > MAX_CW) ? LEN_W'(MAX_CW) : LEN_W'(fill);

  codeword_decoder #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(MAX_MASKS),
    .NUM_MASK_TYPES(NUM_MASK_TYPES), .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE)
  ) u_decoder (
    .head, .avail,
    .ok(dec_ok), .kind(dec_kind), .len(dec_len),
    .raw(dec_raw), .index(dec_index), .xor_pat(dec_xor)
  );

  // a codeword moves on when it is complete and the output stage is free
  assign take = dec_ok && !clear && (!s1_valid || out_ready);

  dictionary #(.W(W), .DEPTH(DICT_DEPTH)) u_dict (
    .clk,
    .wr_en(dict_we), .wr_addr(dict_waddr), .wr_data(dict_wdata),
    .rd_en(take && dec_kind != CW_RAW), .rd_addr(dec_index), .rd_data(dict_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_kind  <= CW_RAW;
      s1_raw   <= '0;
      s1_xor   <= '0;
    end else if (clear) begin
      s1_valid <= 1'b0;
    end else if (take) begin
      s1_valid <= 1'b1;
      s1_kind  <= dec_kind;
      s1_raw   <= dec_raw;
      s1_xor   <= dec_xor;
    end else if (out_ready) begin
      s1_valid <= 1'b0;
    end
  end

  assign out_valid = s1_valid;
  assign out_kind  = s1_kind;
  assign out_data  = (s1_kind == CW_RAW) ? s1_raw : (dict_q ^ s1_xor);

endmodule
