// tb_bmc_decompressor: end-to-end test of the decompressor at its default
// configuration (32-bit words, 512-entry dictionary, 2- and 3-bit bitmasks,
// 32-bit stream input). bmc_stream_agent loads a full 512-entry dictionary,
// compresses several thousand words with the reference model and checks every
// decompressed word, the one-clock latency, the throughput and that every
// mechanism of the design was exercised.
module tb_bmc_decompressor;
  import bmc_pkg::*;

  logic        clk, rst_n, clear;
  logic        dict_we;
  logic [8:0]  dict_waddr;
  logic [31:0] dict_wdata;
  logic        in_valid, in_ready;
  logic [31:0] in_data;
  logic        out_valid, out_ready;
  logic [31:0] out_data;
  cw_kind_e    out_kind;
  logic        done;
  int          checks, failures;

  bmc_decompressor dut (
    .clk, .rst_n, .clear,
    .dict_we, .dict_waddr, .dict_wdata,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .out_kind
  );

  bmc_stream_agent #(.N_WORDS(3000)) agent (
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
