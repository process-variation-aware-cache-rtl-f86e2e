// data_array -- data store of the N-way cache, one gated sub-array per way.
//
// Holds one cache line per way and set. As in the tag array, a read fetches
// the addressed set from every powered way at once; the data select logic then
// picks one of the N lines. A write stores wr_line into each way whose bit of
// we_ways is set (the controller sets one bit at a time).
//
// Interface and timing: rd_en reads set `index`; rd_line[w] is valid one clock
// later and holds until the next read. pwr_en gates each way's sub-array as a
// whole, which is what lets a disabled way stop leaking.
// The sub-array-per-way layout follows the published design; the line width
// (64-byte lines) is this design's choice.
module data_array #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned SETS   = 16384,
  parameter int unsigned LINE_W = 512,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic              clk,
  input  logic [N_WAYS-1:0] pwr_en,
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  index,
  input  logic [N_WAYS-1:0] we_ways,
  input  logic [LINE_W-1:0] wr_line,
  output logic [LINE_W-1:0] rd_line [N_WAYS]
);

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    way_sram #(.DEPTH(SETS), .WIDTH(LINE_W)) u_sram (
      .clk   (clk),
      .pwr_en(pwr_en[w]),
      .en    (rd_en | we_ways[w]),
      .we    (we_ways[w]),
      .addr  (index),
      .wdata (wr_line),
      .rdata (rd_line[w])
    );
  end

endmodule
