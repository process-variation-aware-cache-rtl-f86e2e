// way_sram -- one cache-way sub-array with a gated supply.
//
// Each way of the cache is laid out as its own sub-array so that the whole way
// can be switched off with a supply-gating (gated-VDD) transistor. This module
// is the logic view of such a sub-array: a single-port synchronous SRAM of
// DEPTH words of WIDTH bits plus a power-enable input that stands for the
// gating transistor's control.
//
// Interface and timing:
//   pwr_en  1 = supply on. While 0 the array ignores reads and writes and its
//           read port drives zero. A real gated array loses its contents; here
//           the old words stay in the model, so users must treat a way that has
//           just been powered up as holding garbage (the cache controller
//           invalidates every tag of such a way before using it).
//   en/we   en=1, we=0: read addr, data on rdata one clock later (held until
//           the next read). en=1, we=1: write wdata at addr at the clock edge.
// Per-way supply gating follows the published scheme; the single-port,
// one-cycle-read organisation is this design's own choice.
module way_sram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             pwr_en,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (pwr_en && en && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!pwr_en)          rd_q <= '0;
    else if (en && !we)   rd_q <= mem[addr];
  end

  assign rdata = rd_q;

endmodule
