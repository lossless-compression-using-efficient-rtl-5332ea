// tb_bmc_example_1bit: the small worked configuration used to introduce the
// encoding: 8-bit words, a two-entry dictionary and one bitmask that records
// a 1-bit change. With the n-1 bit encoding such a mask stores no mask bits at
// all; the 3-bit offset alone says which bit to flip. The decompressor is
// built with these parameters and driven by bmc_stream_agent, which checks
// every decompressed word and every mechanism.
module tb_bmc_example_1bit;
  import bmc_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned DICT_DEPTH = 2;

  logic                  clk, rst_n, clear;
  logic                  dict_we;
  logic [$clog2(DICT_DEPTH)-1:0] dict_waddr;
  logic [W-1:0]          dict_wdata;
  logic                  in_valid, in_ready;
  logic [31:0]           in_data;
  logic                  out_valid, out_ready;
  logic [W-1:0]          out_data;
  cw_kind_e              out_kind;
  logic                  done;
  int                    checks, failures;

  bmc_decompressor #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(1), .NUM_MASK_TYPES(1),
    .MASK0_SIZE(1), .MASK1_SIZE(1)
  ) dut (
    .clk, .rst_n, .clear,
    .dict_we, .dict_waddr, .dict_wdata,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_kind
  );

  bmc_stream_agent #(
    .W(W), .DICT_DEPTH(DICT_DEPTH), .MAX_MASKS(1), .NUM_MASK_TYPES(1),
    .MASK0_SIZE(1), .MASK1_SIZE(1), .N_WORDS(2000)
  ) agent (
    .clk, .rst_n, .clear,
    .dict_we, .dict_waddr, .dict_wdata,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_kind(out_kind),
    .done, .checks, .failures
  );

  // the agent clears `done` at time 0; look at it from the first clock on
  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
