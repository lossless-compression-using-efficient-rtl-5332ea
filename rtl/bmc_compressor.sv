// bmc_compressor: encoder for bitmask-based dictionary compression with the
// n-1 bit bitmask encoding; produces the stream that bmc_decompressor reads.
//
// For each input word it scans the whole dictionary, one entry per clock
// (synchronous read, so the entry read in one clock is compared in the next).
// An entry equal to the word ends the scan with a dictionary codeword.
// Otherwise bitmask_cover works out the cheapest bitmask set for the XOR of
// word and entry, and the shortest bitmasked codeword over all entries is
// kept (on a tie the lowest index). If no bitmasked codeword is shorter than
// the uncompressed word, the word is sent uncompressed. codeword_encoder then
// builds the codeword and bit_packer appends it to the IN_W-bit output
// stream.
//
// Interfaces: dictionary write port, to be used before compressing (the
// same contents must be loaded into the decompressor); input words with
// in_valid/in_ready; stream words with out_valid/out_ready. After the last
// word, hold `flush` high until `idle`: the last partial stream word is then
// sent padded with zeros. Asynchronous active-low reset.
//
// Timing: a word takes DICT_DEPTH + 2 clocks when no entry matches it
// exactly, fewer when one does, plus the time to hand the codeword over.
// Choosing the dictionary contents is left to software. The sequential scan
// and the greedy mask placement are this design's own choices; the codeword
// format is that of bmc_decompressor.
module bmc_compressor
  import bmc_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned DICT_DEPTH     = 512,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  parameter int unsigned IN_W           = 32,
  localparam int unsigned MAX_CW   = max_cw_len(W, DICT_DEPTH, MAX_MASKS, NUM_MASK_TYPES,
                                                MASK0_SIZE, MASK1_SIZE),
  localparam int unsigned LEN_W    = $clog2(MAX_CW + 1),
  localparam int unsigned IDX_W    = $clog2(DICT_DEPTH),
  localparam int unsigned OFF_W    = $clog2(W),
  localparam int unsigned CNT_W    = sel_width(MAX_MASKS),
  localparam int unsigned TYPE_W   = sel_width(NUM_MASK_TYPES),
  localparam int unsigned MAX_SIZE = (NUM_MASK_TYPES > 1) ? max2(MASK0_SIZE, MASK1_SIZE) : MASK0_SIZE,
  localparam int unsigned SM_W     = (MAX_SIZE > 1) ? MAX_SIZE - 1 : 1,
  localparam int unsigned MB_W     = $clog2(CNT_W + MAX_MASKS * (TYPE_W + OFF_W + MAX_SIZE) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // dictionary load
  input  logic             dict_we,
  input  logic [IDX_W-1:0] dict_waddr,
  input  logic [W-1:0]     dict_wdata,
  // words to compress
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [W-1:0]     in_data,
  // compressed stream out
  input  logic             flush,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [IN_W-1:0]  out_data,
  output logic             idle
);

  typedef enum logic [1:0] {C_IDLE, C_SCAN, C_EMIT} state_e;

  state_e           state;
  logic [W-1:0]     word_q;
  logic [IDX_W:0]   rd_idx;       // next entry to read
  logic             ev_valid;     // dict_q holds entry ev_idx, to be compared
  logic [IDX_W-1:0] ev_idx;
  logic [W-1:0]     dict_q;
  logic             rd_en;

  // best codeword so far
  cw_kind_e         best_kind;
  logic [IDX_W-1:0] best_idx;
  logic [LEN_W-1:0] best_len;
  logic [CNT_W:0]   best_count;
  logic             best_type   [MAX_MASKS];
  logic [OFF_W-1:0] best_offset [MAX_MASKS];
  logic [SM_W-1:0]  best_stored [MAX_MASKS];

  // candidate from the entry being compared
  logic [W-1:0]     diff;
  logic             cov_ok;
  logic [CNT_W:0]   cov_count;
  logic             cov_type   [MAX_MASKS];
  logic [OFF_W-1:0] cov_offset [MAX_MASKS];
  logic [SM_W-1:0]  cov_stored [MAX_MASKS];
  logic [MB_W-1:0]  cov_bits;
  logic [LEN_W-1:0] cand_len;
  logic             exact;
  logic             better;

  logic [MAX_CW-1:0] cw_bits;
  logic [LEN_W-1:0]  cw_len;
  logic              cw_ready;
  logic              pk_empty;

  dictionary #(.W(W), .DEPTH(DICT_DEPTH)) u_dict (
    .clk,
    .wr_en(dict_we), .wr_addr(dict_waddr), .wr_data(dict_wdata),
    .rd_en, .rd_addr(rd_idx[IDX_W-1:0]), .rd_data(dict_q)
  );

  assign diff = word_q ^ dict_q;

  bitmask_cover #(
    .W(W), .MAX_MASKS(MAX_MASKS), .NUM_MASK_TYPES(NUM_MASK_TYPES),
    .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE)
  ) u_cover (
    .diff, .ok(cov_ok), .count(cov_count), .mtype(cov_type), .offset(cov_offset),
    .stored(cov_stored), .mask_bits(cov_bits)
  );

  assign exact    = diff == '0;
  assign cand_len = LEN_W'(2 + IDX_W + 32'(cov_bits));
  assign better   = cov_ok && cand_len < best_len;
  assign rd_en    = (state == C_SCAN) && (32'(rd_idx) < DICT_DEPTH);
  assign in_ready = state == C_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      word_q     <= '0;
      rd_idx     <= '0;
      ev_valid   <= 1'b0;
      ev_idx     <= '0;
      best_kind  <= CW_RAW;
      best_idx   <= '0;
      best_len   <= '0;
      best_count <= '0;
      for (int m = 0; m < int'(MAX_MASKS); m++) begin
        best_type[m] <= 1'b0; best_offset[m] <= '0; best_stored[m] <= '0;
      end
    end else begin
      case (state)
        C_IDLE: begin
          if (in_valid) begin
            state     <= C_SCAN;
            word_q    <= in_data;
            rd_idx    <= '0;
            ev_valid  <= 1'b0;
            best_kind <= CW_RAW;
            best_len  <= LEN_W'(1 + W);
          end
        end
        C_SCAN: begin
          ev_valid <= rd_en;
          ev_idx   <= rd_idx[IDX_W-1:0];
          if (rd_en) rd_idx <= rd_idx + 1'b1;
          if (ev_valid) begin
            if (exact) begin
              best_kind <= CW_DICT;
              best_idx  <= ev_idx;
              state     <= C_EMIT;
            end else begin
              if (better) begin
                best_kind  <= CW_MASKED;
                best_idx   <= ev_idx;
                best_len   <= cand_len;
                best_count <= cov_count;
                best_type  <= cov_type;
                best_offset <= cov_offset;
                best_stored <= cov_stored;
              end
              if (32'(ev_idx) == DICT_DEPTH - 1) state <= C_EMIT;
            end
          end
        end
        default: begin  // C_EMIT
          if (cw_ready) state <= C_IDLE;
        end
      endcase
    end
  end

  codeword_encoder #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(MAX_MASKS),
    .NUM_MASK_TYPES(NUM_MASK_TYPES), .MASK0_SIZE(MASK0_SIZE), .MASK1_SIZE(MASK1_SIZE)
  ) u_encoder (
    .kind(best_kind), .raw(word_q), .index(best_idx), .count(best_count),
    .mtype(best_type), .offset(best_offset), .stored(best_stored),
    .bits(cw_bits), .len(cw_len)
  );

  bit_packer #(.OUT_W(IN_W), .CW_W(MAX_CW)) u_packer (
    .clk, .rst_n,
    .cw_valid(state == C_EMIT), .cw_ready, .cw_bits, .cw_len,
    .flush(flush && state == C_IDLE && !in_valid),
    .out_valid, .out_ready, .out_data,
    .empty(pk_empty)
  );

  assign idle = (state == C_IDLE) && pk_empty;

endmodule
