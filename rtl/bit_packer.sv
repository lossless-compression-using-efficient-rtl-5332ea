// bit_packer: packs variable-length codewords into fixed-width stream words,
// the inverse of bit_buffer.
//
// A codeword (up to CW_W bits, first bit in the MSB, bits after its length
// 0) is accepted with cw_valid/cw_ready and appended behind the bits already
// held in a left-aligned accumulator of CW_W + OUT_W - 1 bits. Whenever at
// least OUT_W bits are held, the first OUT_W of them are offered as a stream
// word (out_valid/out_ready, first bit in the MSB). A codeword is accepted
// only when fewer than OUT_W bits are held, a condition on registered state,
// so cw_ready does not depend on out_ready. With `flush` high and no codeword
// offered, a last partial word is sent padded with zeros; `empty` says when
// nothing is left. Asynchronous active-low reset.
module bit_packer #(
  parameter int unsigned OUT_W = 32,
  parameter int unsigned CW_W  = 33,
  localparam int unsigned ACC_W  = CW_W + OUT_W - 1,
  localparam int unsigned FILL_W = $clog2(ACC_W + 1),
  localparam int unsigned LEN_W  = $clog2(CW_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cw_valid,
  output logic             cw_ready,
  input  logic [CW_W-1:0]  cw_bits,
  input  logic [LEN_W-1:0] cw_len,
  input  logic             flush,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data,
  output logic             empty
);

  logic [ACC_W-1:0]  acc;
  logic [ACC_W-1:0]  acc_d;
  logic [FILL_W-1:0] fill;
  logic [FILL_W-1:0] fill_d;
  logic [FILL_W-1:0] left;
  logic              full_word;
  logic              send;

  assign full_word = 32'(fill) >= OUT_W;
  assign cw_ready  = !full_word;
  assign out_valid = full_word || (flush && !cw_valid && fill != '0);
  assign out_data  = acc[ACC_W-1 -: OUT_W];
  assign empty     = fill == '0;
  assign send      = out_valid && out_ready;

  always_comb begin
    acc_d = acc;
    left  = fill;
    if (send) begin
      acc_d = acc << OUT_W;
      left  = full_word ? fill - FILL_W'(OUT_W) : '0;
    end
    fill_d = left;
    if (cw_valid && cw_ready) begin
      acc_d  = acc_d | ((ACC_W'(cw_bits) << (ACC_W - CW_W)) >> left);
      fill_d = left + FILL_W'(cw_len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      fill <= '0;
    end else begin
      acc  <= acc_d;
      fill <= fill_d;
    end
  end

endmodule
