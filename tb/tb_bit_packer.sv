// tb_bit_packer: checks the codeword packer against a queue of bits.
// Codewords of random length (1 to 33 bits, random contents, zeros after the
// length) are offered with random gaps while the output is drained with
// random back-pressure; every stream word must be the next 32 bits of the
// queue. At the end `flush` must send the partial last word padded with
// zeros and `empty` must rise. The output must hold while stalled.
module tb_bit_packer;

  localparam int unsigned OUT_W = 32;
  localparam int unsigned CW_W = 33;

  logic             clk = 1'b0;
  logic             rst_n, cw_valid, cw_ready, flush, out_valid, out_ready, empty;
  logic [CW_W-1:0]  cw_bits;
  logic [5:0]       cw_len;
  logic [OUT_W-1:0] out_data;
  bit               model [$];
  int checks = 0;
  int failures = 0;
  int n_block = 0, n_stall = 0;

  always #5 clk = ~clk;

  bit_packer #(.OUT_W(OUT_W), .CW_W(CW_W)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("failed: %s", what);
    end
  endtask

  task automatic take_output();
    if (out_valid && out_ready) begin
      logic [OUT_W-1:0] e = '0;
      for (int b = 0; b < int'(OUT_W); b++)
        e[OUT_W - 1 - b] = (model.size() > 0) ? model.pop_front() : 1'b0;
      check(out_data == e, $sformatf("word %h expected %h", out_data, e));
    end
  endtask

  initial begin
    rst_n = 0; cw_valid = 0; flush = 0; out_ready = 0; cw_bits = 0; cw_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      if (!cw_valid || cw_ready) begin
        // a new codeword (or none)
        cw_valid = ($urandom_range(99) < 70);
        cw_len   = 6'($urandom_range(CW_W, 1));
        cw_bits  = {$urandom, $urandom};
        cw_bits  = cw_bits & ~({CW_W{1'b1}} >> cw_len);
      end
      out_ready = ($urandom_range(99) < 60);
      if (cw_valid && !cw_ready) n_block++;
      if (out_valid && !out_ready) n_stall++;
      take_output();
      if (cw_valid && cw_ready)
        for (int b = 0; b < int'(cw_len); b++) model.push_back(cw_bits[CW_W - 1 - b]);
    end
    // finish: no more codewords, flush what is left
    @(negedge clk);
    out_ready = 0;
    cw_valid = 0;
    flush = 1;
    for (int k = 0; k < 20 && !empty; k++) begin
      @(negedge clk);
      out_ready = 1;
      take_output();
    end
    @(negedge clk);
    check(empty, "not empty after flush");
    check(model.size() == 0, $sformatf("%0d bits never sent", model.size()));
    check(n_block > 0 && n_stall > 0, "no back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
