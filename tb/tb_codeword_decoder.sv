// tb_codeword_decoder: checks the codeword parser at the default
// configuration (32-bit words, 512-entry dictionary, up to two bitmasks of 2
// or 3 bits). Words are compressed against a random dictionary with the
// reference model in bmc_ref_pkg; each codeword is placed at the head of the
// window, followed by random bits, and the decoder's kind, length, raw word,
// index and combined XOR pattern are compared with the model. `avail` is
// sometimes set just below and at the codeword length to check `ok`.
module tb_codeword_decoder;
  import bmc_pkg::*;
  import bmc_ref_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned MAX_CW = 33;

  logic [MAX_CW-1:0] head;
  logic [5:0]        avail;
  logic              ok;
  cw_kind_e          kind;
  logic [5:0]        len;
  logic [W-1:0]      raw;
  logic [8:0]        index;
  logic [W-1:0]      xor_pat;
  int checks = 0;
  int failures = 0;

  codeword_decoder dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("mismatch: %s", what);
    end
  endtask

  initial begin
    cfg_t cfg;
    logic [63:0] dict [$];
    int seen [3];
    cfg = '{w: 32, depth: 512, max_masks: 2, num_types: 2, size0: 2, size1: 3};
    seen = '{0, 0, 0};
    for (int i = 0; i < 16; i++) dict.push_back(64'($urandom));
    for (int k = 0; k < 5000; k++) begin
      cw_t cw;
      logic [W-1:0] x;
      int unsigned n;
      int unsigned r;
      x = dict[$urandom_range(15)][W-1:0];
      r = $urandom_range(9);
      if (r < 6) x ^= W'(32'h7 << $urandom_range(W - 1));
      if (r < 3) x ^= W'(32'h1 << $urandom_range(W - 1));
      if (r == 9) x = $urandom;
      cw = encode(cfg, 64'(x), dict);
      n = cw.bits.size();
      head = {$urandom, $urandom};
      for (int b = 0; b < int'(n); b++) head[MAX_CW - 1 - b] = cw.bits[b];
      case ($urandom_range(3))
        0: avail = 6'(n - 1);
        1: avail = 6'(n);
        default: avail = 6'($urandom_range(MAX_CW, n));
      endcase
      #1;
      seen[cw.kind]++;
      check(ok == (int'(avail) >= int'(n)), "ok");
      check(int'(kind) == cw.kind, "kind");
      check(int'(len) == int'(n), $sformatf("len %0d vs %0d", len, n));
      if (cw.kind == 0) check(raw == x, "raw word");
      else begin
        check(int'(index) == int'(cw.index), "index");
        check(xor_pat == W'(cw.xor_pat), $sformatf("xor %h vs %h", xor_pat, cw.xor_pat));
      end
    end
    // each codeword kind must have been seen
    for (int t = 0; t < 3; t++) check(seen[t] > 0, $sformatf("kind %0d never seen", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
