// tag_array -- tag store of the N-way cache, one gated sub-array per way.
//
// Every way keeps, for each set, one entry {valid, dirty, tag}. All ways are
// read together with the same set index so that the decode logic can compare
// the request tag against every enabled way in the following cycle. A write
// stores the same entry into every way whose bit of we_ways is set; the cache
// controller uses this to invalidate several ways of a set in one cycle.
//
// Interface and timing: rd_en reads set `index` of every powered way; the
// entries appear on rd_entry one clock later. we_ways/wr_entry write at the
// clock edge. pwr_en has one bit per way and gates that way's sub-array.
// Entry layout: bit TAG_W+1 = valid, bit TAG_W = dirty, bits TAG_W-1:0 = tag.
// Placing the tags of a way in that way's gated sub-array is this design's
// choice; the published organisation shows only a "Tag Array" block.
module tag_array #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned SETS   = 16384,
  parameter int unsigned TAG_W  = 20,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned ENT_W = TAG_W + 2
) (
  input  logic              clk,
  input  logic [N_WAYS-1:0] pwr_en,
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  index,
  input  logic [N_WAYS-1:0] we_ways,
  input  logic [ENT_W-1:0]  wr_entry,
  output logic [ENT_W-1:0]  rd_entry [N_WAYS]
);

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    way_sram #(.DEPTH(SETS), .WIDTH(ENT_W)) u_sram (
      .clk   (clk),
      .pwr_en(pwr_en[w]),
      .en    (rd_en | we_ways[w]),
      .we    (we_ways[w]),
      .addr  (index),
      .wdata (wr_entry),
      .rdata (rd_entry[w])
    );
  end

endmodule
