// tb_bit_buffer: checks the alignment buffer against a queue of bits. Words
// are offered with random gaps and codewords of random length (never more
// than the buffer holds) are consumed; every clock the head bits, the fill
// count and in_ready are compared with the model. A clear in the middle must
// empty the buffer. Sizes are those of the default decompressor: 32-bit
// input, a 33-bit head and a 96-bit buffer.
module tb_bit_buffer;

  localparam int unsigned IN_W = 32;
  localparam int unsigned HEAD_W = 33;
  localparam int unsigned BUF_W = HEAD_W + 2 * IN_W - 1;

  logic              clk = 1'b0;
  logic              rst_n, clear, in_valid, in_ready, consume;
  logic [IN_W-1:0]   in_data;
  logic [HEAD_W-1:0] head;
  logic [6:0]        fill;
  logic [5:0]        consume_len;
  bit                model [$];
  int checks = 0;
  int failures = 0;
  int n_full = 0;

  always #5 clk = ~clk;

  bit_buffer #(.IN_W(IN_W), .HEAD_W(HEAD_W), .BUF_W(BUF_W)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("cycle check failed: %s", what);
    end
  endtask

  initial begin
    rst_n = 0; clear = 0; in_valid = 0; consume = 0; consume_len = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      // compare state with the model
      check(int'(fill) == model.size(), $sformatf("fill %0d vs %0d", fill, model.size()));
      check(in_ready == (model.size() + IN_W <= BUF_W), "in_ready");
      for (int b = 0; b < int'(HEAD_W) && b < model.size(); b++)
        if (head[HEAD_W - 1 - b] != model[b]) begin
          check(0, $sformatf("head bit %0d", b));
          break;
        end
      if (k == 10000) begin
        clear = 1; in_valid = 0; consume = 0;
        model.delete();
        continue;
      end
      clear = 0;
      // drive the next clock
      in_valid = ($urandom_range(99) < 60);
      in_data = $urandom;
      consume = (model.size() > 0) && ($urandom_range(99) < 70);
      consume_len = 6'($urandom_range((model.size() < HEAD_W) ? model.size() : HEAD_W, 1));
      if (!consume) consume_len = 6'($urandom_range(HEAD_W));
      if (in_valid && !in_ready) n_full++;
      // update the model as the buffer will
      if (consume) repeat (consume_len) void'(model.pop_front());
      if (in_valid && in_ready)
        for (int b = IN_W - 1; b >= 0; b--) model.push_back(in_data[b]);
    end
    check(n_full > 0, "buffer never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
