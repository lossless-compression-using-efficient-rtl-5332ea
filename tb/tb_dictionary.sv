// tb_dictionary: fills the 512 x 32 dictionary with random words, then reads
// random entries and checks that each appears one clock after the read, that
// rd_data holds when no read is made, and that a read and a write of the same
// entry in one clock return the old entry.
module tb_dictionary;

  localparam int unsigned W = 32;
  localparam int unsigned DEPTH = 512;

  logic         clk = 1'b0;
  logic         wr_en, rd_en;
  logic [8:0]   wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] last;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dictionary #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 9'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      rd_en = 1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = 0;
      check(model[a], "read");
      last = model[a];
      // with no read, the output holds
      @(negedge clk);
      check(last, "hold");
    end
    // read and write of one entry in the same clock give the old entry
    rd_en = 1; rd_addr = 9'd7; wr_en = 1; wr_addr = 9'd7; wr_data = ~model[7];
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    check(model[7], "read during write");
    model[7] = ~model[7];
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    check(model[7], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
