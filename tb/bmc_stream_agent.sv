// bmc_stream_agent: drives and checks a bmc_decompressor from the outside.
//
// The agent makes a random dictionary, loads it through the dictionary write
// port, makes input words that match entries exactly, differ from them in a
// few bits that bitmasks can record (including bits at the right end of the
// word, where a mask is cut off), or are random, compresses them with the
// reference model in bmc_ref_pkg, and streams the packed codewords into the
// decompressor. Every output word is compared with the original word.
//
// Three runs are made: a free-flowing one (input always valid, output always
// ready) that also checks the one-clock latency and the number of clocks, a
// run with random input gaps and random output back-pressure, and a last run
// after `clear`. It counts how often each mechanism was exercised (each
// codeword kind, one and two masks, each mask size, a mask cut off at the word
// end, output stall, input buffer full, clear) and counts a failure for any
// that never happened. It raises `done` at the end; the testbench around it
// prints the result, ends the simulation and holds the watchdog. The
// parameters must match those of the connected decompressor.
module bmc_stream_agent
  import bmc_ref_pkg::*;
#(
  parameter int unsigned W              = 32,
  parameter int unsigned DICT_DEPTH     = 512,
  parameter int unsigned MAX_MASKS      = 2,
  parameter int unsigned NUM_MASK_TYPES = 2,
  parameter int unsigned MASK0_SIZE     = 2,
  parameter int unsigned MASK1_SIZE     = 3,
  parameter int unsigned IN_W           = 32,
  parameter int unsigned N_WORDS        = 2000,
  localparam int unsigned IDX_W         = $clog2(DICT_DEPTH)
) (
  output logic             clk,
  output logic             rst_n,
  output logic             clear,
  output logic             dict_we,
  output logic [IDX_W-1:0] dict_waddr,
  output logic [W-1:0]     dict_wdata,
  output logic             in_valid,
  input  logic             in_ready,
  output logic [IN_W-1:0]  in_data,
  input  logic             out_valid,
  output logic             out_ready,
  input  logic [W-1:0]     out_data,
  input  logic [1:0]       out_kind,
  // test status, read by the testbench that ends the simulation
  output logic             done,
  output int               checks,
  output int               failures
);

  longint cycle = 0;

  cfg_t cfg;
  logic [63:0] dict [$];
  logic [63:0] words [$];
  logic [IN_W-1:0] stream [$];

  // mechanism counters
  int n_raw = 0, n_dict = 0, n_masked = 0, n_two = 0, n_type0 = 0, n_type1 = 0;
  int n_cut = 0, n_stall = 0, n_full = 0, n_clear = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // handshake rule: held output must stay stable; count stalls and full buffer
  logic          was_stalled = 1'b0;
  logic [W-1:0]  held_data;
  always @(posedge clk) begin
    if (rst_n && !clear) begin
      if (was_stalled) begin
        assert (out_valid && out_data == held_data)
          else begin failures++; $error("output changed while stalled"); end
      end
      was_stalled <= out_valid && !out_ready;
      held_data   <= out_data;
      if (out_valid && !out_ready) n_stall++;
      if (in_valid && !in_ready) n_full++;
    end else begin
      was_stalled <= 1'b0;
    end
  end

  function automatic logic [W-1:0] rand_word();
    logic [63:0] r = {$urandom, $urandom};
    return r[W-1:0];
  endfunction

  // make n input words and the packed stream for them
  int unsigned first_len;

  task automatic make_stream(int unsigned n);
    cw_t cw;
    bit bits [$];
    words.delete();
    stream.delete();
    for (int unsigned k = 0; k < n; k++) begin
      logic [W-1:0] x;
      x = W'(make_word(cfg, dict));
      words.push_back(64'(x));
      cw = encode(cfg, 64'(x), dict);
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
      if (k == 0) first_len = cw.bits.size();
      foreach (cw.bits[b]) bits.push_back(cw.bits[b]);
    end
    while (bits.size() % IN_W != 0) bits.push_back(1'b0);
    for (int i = 0; i < bits.size(); i += IN_W) begin
      logic [IN_W-1:0] v = '0;
      for (int j = 0; j < int'(IN_W); j++) v[IN_W - 1 - j] = bits[i + j];
      stream.push_back(v);
    end
  endtask

  // stream the words in and check them out; gaps/stalls in percent. Inputs
  // are driven at the falling edge, where the handshake signals are settled
  // for the next rising edge.
  task automatic run(int unsigned gap_pct, int unsigned stall_pct, output longint cycles,
                     output longint first_in, output longint first_out);
    int unsigned got = 0;
    int unsigned sent = 0;
    longint start = cycle;
    first_in = -1;
    first_out = -1;
    fork
      begin
        while (sent < stream.size()) begin
          @(negedge clk);
          in_valid = ($urandom_range(99) >= gap_pct);
          in_data  = stream[sent];
          if (in_valid && in_ready) begin
            if (first_in < 0) first_in = cycle;
            sent++;
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin
        while (got < words.size()) begin
          @(negedge clk);
          out_ready = ($urandom_range(99) >= stall_pct);
          if (out_valid && out_ready) begin
            if (first_out < 0) first_out = cycle;
            checks++;
            if (out_data != words[got][W-1:0]) begin
              failures++;
              if (failures < 10)
                $display("word %0d: got %h expected %h (kind %0d)", got, out_data,
                         words[got][W-1:0], out_kind);
            end
            got++;
          end
        end
        @(negedge clk);
        out_ready = 1'b0;
      end
    join
    cycles = cycle - start;
  endtask

  task automatic pulse_clear();
    repeat (3) @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    n_clear++;
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  longint cycles, first_in, first_out;
  int unsigned budget;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    cfg = '{w: W, depth: DICT_DEPTH, max_masks: MAX_MASKS, num_types: NUM_MASK_TYPES,
            size0: MASK0_SIZE, size1: MASK1_SIZE};
    rst_n = 1'b0; clear = 1'b0; dict_we = 1'b0; dict_waddr = '0; dict_wdata = '0;
    in_valid = 1'b0; in_data = '0; out_ready = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // dictionary load
    for (int unsigned i = 0; i < DICT_DEPTH; i++) begin
      logic [W-1:0] d;
      d = rand_word();
      dict.push_back(64'(d));
      @(negedge clk);
      dict_we = 1'b1; dict_waddr = IDX_W'(i); dict_wdata = d;
    end
    @(negedge clk);
    dict_we = 1'b0;

    // run 1: free flow, one-clock latency and throughput
    make_stream(N_WORDS);
    run(0, 0, cycles, first_in, first_out);
    $display("free flow: %0d words, %0d stream words of %0d bits, %0d clocks",
             words.size(), stream.size(), IN_W, cycles);
    checks++;
    // the input word that completes the first codeword enters the buffer at
    // one edge; the codeword is decoded and registered at the next, so the
    // word is on the output one clock after it was complete in the buffer
    if (first_out - first_in != ((first_len <= IN_W) ? 2 : 3)) begin
      failures++;
      $display("latency: first word out %0d clocks after first input", first_out - first_in);
    end
    // one codeword per clock, or IN_W stream bits per clock, whichever is slower
    budget = ((words.size() > stream.size()) ? words.size() : stream.size()) * 51 / 50 + 8;
    checks++;
    if (cycles > budget) begin
      failures++;
      $display("throughput: %0d clocks, budget %0d", cycles, budget);
    end

    // run 2: random gaps and back-pressure; the padding left over from run 1
    // is dropped by clear first
    pulse_clear();
    make_stream(N_WORDS);
    run(30, 40, cycles, first_in, first_out);

    // run 3: a short stream, again after clear
    pulse_clear();
    make_stream(N_WORDS / 4 + 1);
    run(10, 10, cycles, first_in, first_out);

    $display("mechanisms:");
    expect_seen("uncompressed codeword", n_raw);
    expect_seen("dictionary codeword", n_dict);
    expect_seen("bitmasked codeword", n_masked);
    if (MAX_MASKS > 1) expect_seen("codeword with two bitmasks", n_two);
    expect_seen("first-size bitmask", n_type0);
    if (NUM_MASK_TYPES > 1) expect_seen("second-size bitmask", n_type1);
    if (MASK0_SIZE > 1 || (NUM_MASK_TYPES > 1 && MASK1_SIZE > 1))
      expect_seen("bitmask cut at word end", n_cut);
    expect_seen("output stall", n_stall);
    expect_seen("input buffer full", n_full);
    expect_seen("clear between streams", n_clear);

    done = 1'b1;
  end

endmodule
