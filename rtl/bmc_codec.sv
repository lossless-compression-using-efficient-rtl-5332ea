// bmc_codec: compressor and decompressor for bitmask-based dictionary
// compression with n-1 bit bitmasks, side by side.
//
// The compressor turns W-bit words into a packed stream of codewords; the
// decompressor turns such a stream back into words, one per clock. The two
// share one dictionary write port, so that both hold the same dictionary,
// which is what makes a stream from one readable by the other. Their streams
// are not connected inside: in a system the compressed image is made once and
// stored, and decompressed later, from memory, when it is used. See
// bmc_compressor and bmc_decompressor for the format, timing and handshakes.
module bmc_codec
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned DICT_DEPTH     = 512,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  parameter int unsigned IN_W           = 32,
  localparam int unsigned IDX_W         = $clog2(DICT_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // dictionary load, to both halves
  input  logic             dict_we,
  input  logic [IDX_W-1:0] dict_waddr,
  input  logic [W-1:0]     dict_wdata,
  // compressor: words in, stream out
  input  logic             comp_in_valid,
  output logic             comp_in_ready,
  input  logic [W-1:0]     comp_in_data,
  input  logic             comp_flush,
  output logic             comp_out_valid,
  input  logic             comp_out_ready,
  output logic [IN_W-1:0]  comp_out_data,
  output logic             comp_idle,
  // decompressor: stream in, words out
  input  logic             dec_clear,
  input  logic             dec_in_valid,
  output logic             dec_in_ready,
  input  logic [IN_W-1:0]  dec_in_data,
  output logic             dec_out_valid,
  input  logic             dec_out_ready,
  output logic [W-1:0]     dec_out_data,
  output cw_kind_e         dec_out_kind
);

  bmc_compressor #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(MAX_MASKS), .NUM_MASK_TYPES(NUM_MASK_TYPES),
    .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE), .IN_W(IN_W)
  ) u_compressor (
    .clk, .rst_n,
    .dict_we, .dict_waddr, .dict_wdata,
    .in_valid(comp_in_valid), .in_ready(comp_in_ready), .in_data(comp_in_data),
    .flush(comp_flush),
    .out_valid(comp_out_valid), .out_ready(comp_out_ready), .out_data(comp_out_data),
    .idle(comp_idle)
  );

  bmc_decompressor #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(MAX_MASKS), .NUM_MASK_TYPES(NUM_MASK_TYPES),
    .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE), .IN_W(IN_W)
  ) u_decompressor (
    .clk, .rst_n, .clear(dec_clear),
    .dict_we, .dict_waddr, .dict_wdata,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data(dec_in_data),
    .out_valid(dec_out_valid), .out_ready(dec_out_ready), .out_data(dec_out_data),
    .out_kind(dec_out_kind)
  );

endmodule
