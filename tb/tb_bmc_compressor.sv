// tb_bmc_compressor: checks the compressor in a small single-mask
// configuration (16-bit words, 16-entry dictionary, one 2-bit sliding
// bitmask), which also exercises the formats without count and size fields.
// Words are offered with random gaps, the stream is drained with random
// back-pressure and flushed at the end; the stream must equal, bit for bit,
// the reference model's. Every word's busy time is measured: DICT_DEPTH + 3
// clocks when no entry matches exactly (when the stream output is not
// blocked), fewer when one does.
module tb_bmc_compressor;
  import bmc_ref_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned DICT_DEPTH = 16;
  localparam int unsigned N_WORDS = 3000;

  logic        clk = 1'b0;
  logic        rst_n, dict_we, in_valid, in_ready, flush, out_valid, out_ready, idle;
  logic [3:0]  dict_waddr;
  logic [15:0] dict_wdata, in_data;
  logic [31:0] out_data;
  int checks = 0;
  int failures = 0;

  cfg_t cfg;
  logic [63:0] dict [$];
  logic [63:0] words [$];
  logic [63:0] ref_stream [$];
  logic [63:0] got_stream [$];
  int n_full_scan = 0, n_early = 0, n_flush = 0, n_stall = 0;

  always #5 clk = ~clk;

  bmc_compressor #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(1), .NUM_MASK_TYPES(1), .MASK0_SIZE(2)
  ) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("failed: %s", what);
    end
  endtask

  // busy time of each word, from the clock after it is taken to in_ready
  int busy = 0;
  bit blocked = 0;
  always @(posedge clk) begin
    if (rst_n && !in_ready) begin
      busy++;
      if (out_valid && !out_ready) blocked = 1;
    end else if (busy > 0) begin
      if (busy == DICT_DEPTH + 2) n_full_scan++;
      else if (busy < DICT_DEPTH + 2) n_early++;
      else if (!blocked) check(0, $sformatf("word busy for %0d clocks", busy));
      busy = 0;
      blocked = 0;
    end
    if (out_valid && !out_ready) n_stall++;
  end

  initial begin
    int unsigned sent = 0;
    bit done = 0;
    cfg = '{w: W, depth: DICT_DEPTH, max_masks: 1, num_types: 1, size0: 2, size1: 2};
    rst_n = 0; dict_we = 0; dict_waddr = 0; dict_wdata = 0;
    in_valid = 0; in_data = 0; flush = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(DICT_DEPTH); i++) begin
      logic [15:0] d;
      d = 16'($urandom);
      dict.push_back(64'(d));
      @(negedge clk);
      dict_we = 1; dict_waddr = 4'(i); dict_wdata = d;
    end
    @(negedge clk);
    dict_we = 0;
    for (int k = 0; k < int'(N_WORDS); k++) words.push_back(make_word(cfg, dict));
    pack(cfg, 32, words, dict, ref_stream);

    fork
      begin
        while (sent < words.size()) begin
          @(negedge clk);
          in_valid = ($urandom_range(99) < 70);
          in_data  = words[sent][15:0];
          if (in_valid && in_ready) sent++;
        end
        @(negedge clk);
        in_valid = 0;
        flush = 1;
        while (!idle) @(negedge clk);
        flush = 0;
        done = 1;
      end
      begin
        while (!done || out_valid) begin
          @(negedge clk);
          out_ready = ($urandom_range(99) < 70);
          if (out_valid && out_ready) begin
            got_stream.push_back(64'(out_data));
            if (flush) n_flush++;
          end
        end
      end
    join

    check(got_stream.size() == ref_stream.size(),
          $sformatf("stream has %0d words, model %0d", got_stream.size(), ref_stream.size()));
    foreach (ref_stream[i])
      if (i < got_stream.size())
        check(got_stream[i] == ref_stream[i],
              $sformatf("stream word %0d: %h, model %h", i, got_stream[i], ref_stream[i]));
    check(n_full_scan > 0, "no full scan");
    check(n_early > 0, "no early stop");
    check(n_flush > 0, "no flushed word");
    check(n_stall > 0, "no back-pressure");
    $display("full scans %0d, early stops %0d, flushed words %0d", n_full_scan, n_early, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
