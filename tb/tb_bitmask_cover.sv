// tb_bitmask_cover: checks the bitmask search for 32-bit words with up to two
// masks of 2 or 3 bits against the reference model. Differences are made of
// one or two clusters of flipped bits, sometimes at the end of the word, some
// coverable and some not, plus zero and random differences. For each, `ok`,
// the number of masks, the size, offset and stored bits of each mask and the
// length of the mask fields must equal the model's cheapest choice.
module tb_bitmask_cover;
  import bmc_ref_pkg::*;

  localparam int unsigned W = 32;

  logic [W-1:0] diff;
  logic         ok;
  logic [1:0]   count;
  logic         mtype  [2];
  logic [4:0]   offset [2];
  logic [1:0]   stored [2];
  logic [4:0]   mask_bits;
  int checks = 0;
  int failures = 0;
  int n_ok = 0, n_not = 0, n_two = 0;

  bitmask_cover dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("diff %h: %s", diff, what);
    end
  endtask

  initial begin
    cfg_t cfg;
    logic [63:0] dict [$];
    cfg = '{w: 32, depth: 2, max_masks: 2, num_types: 2, size0: 2, size1: 3};
    dict.push_back(0);
    for (int k = 0; k < 20000; k++) begin
      cw_t cw;
      int unsigned r;
      logic [W-1:0] d;
      r = $urandom_range(9);
      d = W'(32'($urandom_range(7)) << $urandom_range(W - 1));
      if (r < 5) d ^= W'(32'($urandom_range(7)) << $urandom_range(W - 1));
      if (r == 6) d = W'($urandom_range(3));
      if (r == 7) d = $urandom;
      if (r == 8) d = '0;
      diff = d;
      #1;
      // with an all-zero entry the word is the difference itself
      cw = encode(cfg, 64'(d), dict);
      if (cw.kind == 2) begin
        n_ok++;
        if (cw.count > 1) n_two++;
        check(ok, "not found");
        check(int'(count) == int'(cw.count), "count");
        for (int m = 0; m < int'(cw.count); m++) begin
          check(int'(mtype[m]) == int'(cw.mtype[m]), "type");
          check(int'(offset[m]) == int'(cw.offset[m]), "offset");
          check(int'(stored[m]) == int'(cw.stored[m]), "stored");
        end
        check(int'(mask_bits) == int'(cw_len(cfg, cw)) - 2 - 1, "mask bits");
      end else begin
        n_not++;
        check(!ok, "found a cover the model rejects");
      end
    end
    check(n_ok > 0 && n_not > 0 && n_two > 0, "case mix");
    $display("covered %0d (two masks %0d), not covered %0d", n_ok, n_two, n_not);
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
