// tb_bitmask_expand: exhaustive test of the bitmask expander for 32-bit words
// with 2- and 3-bit masks: every mask type, every offset and every stored
// value. The expected pattern is built bit by bit: the bit at the offset
// (counted from the left) is 1, the next size-1 bits are the stored bits, most
// significant first, and bits past the end of the word are dropped.
module tb_bitmask_expand;

  localparam int unsigned W = 32;

  logic        mask_type;
  logic [4:0]  offset;
  logic [1:0]  stored;
  logic [W-1:0] pattern;
  logic [W-1:0] expected;
  int checks = 0;
  int failures = 0;

  bitmask_expand #(.W(W), .NUM_MASK_TYPES(2), .MASK0_SIZE(2), .MASK1_SIZE(3)) dut (
    .mask_type, .offset, .stored, .pattern
  );

  initial begin
    for (int t = 0; t < 2; t++) begin
      for (int o = 0; o < int'(W); o++) begin
        for (int s = 0; s < 4; s++) begin
          int size;
          size = t ? 3 : 2;
          mask_type = 1'(t);
          offset = 5'(o);
          stored = 2'(s);
          expected = '0;
          for (int j = 0; j < size; j++) begin
            if (o + j < int'(W))
              expected[W - 1 - (o + j)] = (j == 0) ? 1'b1 : stored[size - 1 - j];
          end
          #1;
          checks++;
          if (pattern !== expected) begin
            failures++;
            $display("type %0d offset %0d stored %b: got %h expected %h",
                     t, o, stored, pattern, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
