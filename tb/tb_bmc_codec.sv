// tb_bmc_codec: end-to-end test of the codec at its default configuration
// (32-bit words, 512-entry dictionary, 2- and 3-bit bitmasks, 32-bit stream).
//
// A random 512-entry dictionary is loaded into both halves through the shared
// write port. Test words are compressed by the compressor, with random gaps
// on its input and random back-pressure on its stream output, and the stream
// is flushed at the end. The stream must equal, bit for bit, the one the
// reference model in bmc_ref_pkg builds for the same words. The stream is then
// fed to the decompressor, again with gaps and back-pressure, and every word
// that comes out must equal the word that went in. The compressor's clocks
// per word are checked against DICT_DEPTH + 3 for a word that matches no
// entry exactly. Each mechanism (codeword kinds, one and two masks, both mask
// sizes, a mask cut at the word end, early stop on an exact match, a flushed
// partial word, back-pressure on both stream and word outputs, a full
// decompressor input buffer) is counted and must occur.
module tb_bmc_codec;
  import bmc_pkg::*;
  import bmc_ref_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned DICT_DEPTH = 512;
  localparam int unsigned IN_W = 32;
  localparam int unsigned N_WORDS = 1000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        dict_we;
  logic [8:0]  dict_waddr;
  logic [31:0] dict_wdata;
  logic        comp_in_valid, comp_in_ready, comp_flush;
  logic [31:0] comp_in_data;
  logic        comp_out_valid, comp_out_ready, comp_idle;
  logic [31:0] comp_out_data;
  logic        dec_clear, dec_in_valid, dec_in_ready;
  logic [31:0] dec_in_data;
  logic        dec_out_valid, dec_out_ready;
  logic [31:0] dec_out_data;
  cw_kind_e    dec_out_kind;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bmc_codec dut (.*);

  cfg_t cfg;
  logic [63:0] dict [$];
  logic [63:0] words [$];
  logic [63:0] ref_stream [$];
  logic [63:0] got_stream [$];

  int n_raw = 0, n_dict = 0, n_masked = 0, n_two = 0, n_type0 = 0, n_type1 = 0, n_cut = 0;
  int n_early = 0, n_flush = 0, n_cstall = 0, n_dstall = 0, n_full = 0;

  // busy spells of the compressor shorter than a full scan: exact matches
  int busy = 0;
  always @(posedge clk) begin
    if (rst_n && !comp_in_ready) busy++;
    else if (busy > 0) begin
      if (busy < DICT_DEPTH) n_early++;
      busy = 0;
    end
  end

  always @(posedge clk) begin
    if (comp_out_valid && !comp_out_ready) n_cstall++;
    if (dec_out_valid && !dec_out_ready) n_dstall++;
    if (dec_in_valid && !dec_in_ready) n_full++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("failed: %s", what);
    end
  endtask

  task automatic expect_seen(string what, int n);
    check(n > 0, {"mechanism never exercised: ", what});
    $display("  %-28s %0d", what, n);
  endtask

  // compress all words; collect the stream
  task automatic compress();
    int unsigned sent = 0;
    bit          stream_done = 0;
    fork
      begin
        while (sent < words.size()) begin
          @(negedge clk);
          comp_in_valid = ($urandom_range(99) < 70);
          comp_in_data  = words[sent][31:0];
          if (comp_in_valid && comp_in_ready) begin
            sent++;
          end
        end
        @(negedge clk);
        comp_in_valid = 0;
        comp_flush = 1;
        while (!comp_idle) @(negedge clk);
        comp_flush = 0;
        stream_done = 1;
      end
      begin
        while (!stream_done || comp_out_valid) begin
          @(negedge clk);
          comp_out_ready = ($urandom_range(99) < 60);
          if (comp_out_valid && comp_out_ready) begin
            got_stream.push_back(64'(comp_out_data));
            if (comp_flush) n_flush++;
          end
        end
        comp_out_ready = 0;
      end
    join
  endtask

  // feed the stream to the decompressor and check the words
  task automatic decompress();
    int unsigned sent = 0;
    int unsigned got = 0;
    fork
      begin
        while (sent < got_stream.size()) begin
          @(negedge clk);
          dec_in_valid = ($urandom_range(99) < 80);
          dec_in_data  = got_stream[sent][31:0];
          if (dec_in_valid && dec_in_ready) sent++;
        end
        @(negedge clk);
        dec_in_valid = 0;
      end
      begin
        while (got < words.size()) begin
          @(negedge clk);
          dec_out_ready = ($urandom_range(99) < 70);
          if (dec_out_valid && dec_out_ready) begin
            check(dec_out_data == words[got][31:0],
                  $sformatf("word %0d: got %h expected %h", got, dec_out_data, words[got][31:0]));
            got++;
          end
        end
        dec_out_ready = 0;
      end
    join
  endtask

  // clocks the compressor takes for one word with no exact match: idle,
  // DICT_DEPTH + 1 scan clocks, hand-over
  task automatic time_one_word();
    logic [63:0] x;
    longint t0;
    cw_t cw;
    x = 64'(dict[0] ^ 64'h1);
    x[31] = ~x[31];   // far from every entry in practice
    cw = encode(cfg, x, dict);
    @(negedge clk);
    comp_out_ready = 1;
    comp_in_valid = 1; comp_in_data = x[31:0];
    t0 = cycle;
    @(negedge clk);
    comp_in_valid = 0;
    while (!comp_in_ready) @(negedge clk);
    $display("compressor: %0d clocks for a word with no exact match", cycle - t0);
    check(cycle - t0 == DICT_DEPTH + 3, $sformatf("word took %0d clocks", cycle - t0));
    comp_flush = 1;
    while (!comp_idle) @(negedge clk);
    comp_flush = 0;
    comp_out_ready = 0;
  endtask

  initial begin
    cfg = '{w: W, depth: DICT_DEPTH, max_masks: 2, num_types: 2, size0: 2, size1: 3};
    rst_n = 0; dict_we = 0; dict_waddr = 0; dict_wdata = 0;
    comp_in_valid = 0; comp_in_data = 0; comp_flush = 0; comp_out_ready = 0;
    dec_clear = 0; dec_in_valid = 0; dec_in_data = 0; dec_out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(DICT_DEPTH); i++) begin
      logic [31:0] d;
      d = $urandom;
      dict.push_back(64'(d));
      @(negedge clk);
      dict_we = 1; dict_waddr = 9'(i); dict_wdata = d;
    end
    @(negedge clk);
    dict_we = 0;

    for (int k = 0; k < int'(N_WORDS); k++) words.push_back(make_word(cfg, dict));
    foreach (words[k]) begin
      cw_t cw;
      cw = encode(cfg, words[k], dict);
      case (cw.kind)
        0: n_raw++;
        1: n_dict++;
        default: begin
          n_masked++;
          if (cw.count > 1) n_two++;
          for (int m = 0; m < int'(cw.count); m++) begin
            if (cw.mtype[m] == 0) n_type0++; else n_type1++;
            if (cw.offset[m] + msize(cfg, cw.mtype[m]) > W) n_cut++;
          end
        end
      endcase
    end
    pack(cfg, IN_W, words, dict, ref_stream);
    begin
      // for information: the same codewords with every mask stored in full
      int unsigned n1 = 0, full = 0;
      foreach (words[k]) begin
        cw_t cw;
        cw = encode(cfg, words[k], dict);
        n1 += cw.bits.size();
        full += cw.bits.size() + ((cw.kind == 2) ? cw.count : 0);
      end
      $display("codeword bits: %0d with n-1 bit masks, %0d with full masks, %0d uncompressed",
               n1, full, N_WORDS * W);
    end

    compress();
    check(got_stream.size() == ref_stream.size(),
          $sformatf("stream has %0d words, model %0d", got_stream.size(), ref_stream.size()));
    foreach (ref_stream[i])
      if (i < got_stream.size())
        check(got_stream[i] == ref_stream[i],
              $sformatf("stream word %0d: %h, model %h", i, got_stream[i], ref_stream[i]));

    decompress();
    time_one_word();

    $display("mechanisms:");
    expect_seen("uncompressed codeword", n_raw);
    expect_seen("dictionary codeword", n_dict);
    expect_seen("early stop on exact match", n_early);
    expect_seen("bitmasked codeword", n_masked);
    expect_seen("codeword with two bitmasks", n_two);
    expect_seen("2-bit bitmask", n_type0);
    expect_seen("3-bit bitmask", n_type1);
    expect_seen("bitmask cut at word end", n_cut);
    expect_seen("flushed partial word", n_flush);
    expect_seen("stream back-pressure", n_cstall);
    expect_seen("word back-pressure", n_dstall);
    expect_seen("decompressor input full", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
