// dictionary: the table of frequently occurring words used by the
// decompressor.
//
// DEPTH entries of W bits, written through a simple write port before the
// compressed stream is decoded (the dictionary travels with the compressed
// data and is loaded first), and read by dictionary index. The read is
// synchronous, as in a block RAM: when rd_en is high in a cycle, rd_data shows
// the addressed entry from the next cycle on and holds it until the next
// read. A write and a read of the same entry in one cycle return the old
// entry. Nothing is reset: entries must be written before they are read.
module dictionary #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
