// tb_codeword_encoder: checks codeword packing at the default configuration
// against the reference model. Random words are compressed by the model
// against a small random dictionary; the model's fields drive the encoder,
// whose bits and length must equal the model's codeword, with zeros after
// it. Each result is also fed to codeword_decoder, which must return the
// same fields, so the two are checked to be inverses.
module tb_codeword_encoder;
  import bmc_pkg::*;
  import bmc_ref_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned MAX_CW = 33;

  cw_kind_e          kind;
  logic [W-1:0]      raw;
  logic [8:0]        index;
  logic [1:0]        count;
  logic              mtype  [2];
  logic [4:0]        offset [2];
  logic [1:0]        stored [2];
  logic [MAX_CW-1:0] bits;
  logic [5:0]        len;

  logic              d_ok;
  cw_kind_e          d_kind;
  logic [5:0]        d_len;
  logic [W-1:0]      d_raw;
  logic [8:0]        d_index;
  logic [W-1:0]      d_xor;

  int checks = 0;
  int failures = 0;
  int seen [3];

  codeword_encoder dut (.*);

  codeword_decoder u_dec (
    .head(bits), .avail(6'(MAX_CW)), .ok(d_ok), .kind(d_kind), .len(d_len),
    .raw(d_raw), .index(d_index), .xor_pat(d_xor)
  );

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
    logic [MAX_CW-1:0] expect_bits;
    cfg = '{w: 32, depth: 512, max_masks: 2, num_types: 2, size0: 2, size1: 3};
    seen = '{0, 0, 0};
    for (int i = 0; i < 16; i++) dict.push_back(64'($urandom));
    for (int k = 0; k < 5000; k++) begin
      cw_t cw;
      logic [63:0] x;
      x = make_word(cfg, dict);
      cw = encode(cfg, x, dict);
      seen[cw.kind]++;
      kind  = cw_kind_e'(cw.kind);
      raw   = x[W-1:0];
      index = 9'(cw.index);
      count = 2'(cw.count);
      for (int m = 0; m < 2; m++) begin
        mtype[m] = cw.mtype[m][0]; offset[m] = 5'(cw.offset[m]); stored[m] = 2'(cw.stored[m]);
      end
      expect_bits = '0;
      foreach (cw.bits[b]) expect_bits[MAX_CW - 1 - b] = cw.bits[b];
      #1;
      check(bits == expect_bits, $sformatf("bits %h vs %h", bits, expect_bits));
      check(int'(len) == cw.bits.size(), "len");
      check(d_ok && d_kind == kind && d_len == len, "decoder kind/len");
      if (cw.kind == 0) check(d_raw == raw, "decoder raw");
      else check(d_index == index && d_xor == W'(cw.xor_pat), "decoder index/xor");
    end
    for (int t = 0; t < 3; t++) check(seen[t] > 0, "kind never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
