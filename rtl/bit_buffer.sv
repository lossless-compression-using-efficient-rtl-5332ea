// bit_buffer: alignment buffer between the fixed-width compressed memory and
// the variable-length codewords.
//
// The compressed stream arrives as IN_W-bit words (first stream bit in the
// MSB) with a valid/ready handshake. The buffer keeps the not yet decoded bits
// left-aligned in a BUF_W-bit register, with `fill` valid bits; the bits below
// them are kept 0. `head` shows the first HEAD_W bits to the codeword decoder.
// In a cycle with `consume` high, the first `consume_len` bits (one codeword)
// are dropped, and in the same cycle a new input word may be appended behind
// what is left. A word is accepted whenever fill + IN_W <= BUF_W, a condition
// on registered state only, so in_ready does not depend on the consumer. With
// BUF_W >= HEAD_W + IN_W - 1 a buffer holding fewer than HEAD_W bits can
// always take a word, so a codeword of up to HEAD_W bits is never starved.
// `clear` empties the buffer between streams, so that padding at the end of
// one stream is not taken for a codeword. The buffer as a whole is this
// design's own structure.
module bit_buffer #(
  parameter int unsigned IN_W   = 32,
  parameter int unsigned HEAD_W = 33,
  parameter int unsigned BUF_W  = HEAD_W + IN_W - 1,
  localparam int unsigned FILL_W = $clog2(BUF_W + 1),
  localparam int unsigned LEN_W  = $clog2(HEAD_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  output logic [HEAD_W-1:0] head,
  output logic [FILL_W-1:0] fill,
  input  logic              consume,
  input  logic [LEN_W-1:0]  consume_len
);

  logic [BUF_W-1:0]  buf_q;
  logic [BUF_W-1:0]  buf_d;
  logic [FILL_W-1:0] fill_d;
  logic [FILL_W-1:0] left;
  logic [FILL_W-1:0] drop;

  assign head     = buf_q[BUF_W-1 -: HEAD_W];
  assign in_ready = (32'(fill) + IN_W) <= BUF_W;

  always_comb begin
    drop   = consume ? FILL_W'(consume_len) : '0;
    left   = fill - drop;
    buf_d  = buf_q << drop;
    fill_d = left;
    if (in_valid && in_ready) begin
      buf_d  = buf_d | ((BUF_W'(in_data) << (BUF_W - IN_W)) >> left);
      fill_d = left + FILL_W'(IN_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      fill  <= '0;
    end else if (clear) begin
      buf_q <= '0;
      fill  <= '0;
    end else begin
      buf_q <= buf_d;
      fill  <= fill_d;
    end
  end

  // a codeword can only be taken when all its bits are in the buffer (in
  // reset the buffer is empty and nothing may be consumed either)
  assert property (@(posedge clk) consume && !clear |-> 32'(consume_len) <= 32'(fill))
    else $error("bit_buffer: consumed %0d bits with %0d in buffer", consume_len, fill);

endmodule
