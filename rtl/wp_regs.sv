// wp_regs -- the PRIORITY and DEGREE registers of way prioritization.
//
// PRIORITY holds N_WAYS entries of log2(N_WAYS) bits: entry 0 names the
// physical way with the highest leakage, entry N_WAYS-1 the way with the
// lowest. DEGREE holds, in the same order, the quantized absolute leakage of
// the way named by the matching PRIORITY entry. The sizing logic reads both.
//
// The registers are filled at boot from off-chip non-volatile storage through
// a single-entry write port (wr_en, wr_sel 0=PRIORITY 1=DEGREE, wr_idx,
// wr_data), or all at once from the on-chip leakage profiler (load_en).
// load_en wins over wr_en. Both take effect at the clock edge.
// Reset value: PRIORITY = way order 0..N-1, DEGREE = 0, i.e. no leakage
// information, which makes the cache behave like plain selective ways.
// Entry widths follow the published description for PRIORITY; the 4-bit
// DEGREE, the reset values and the write port are this design's choices.
module wp_regs #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned DEG_W  = 4,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned IDX_W = WAY_W,
  localparam int unsigned WR_W  = (WAY_W > DEG_W) ? WAY_W : DEG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic             wr_sel,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [WR_W-1:0]  wr_data,
  input  logic             load_en,
  input  logic [WAY_W-1:0] load_priority [N_WAYS],
  input  logic [DEG_W-1:0] load_degree   [N_WAYS],
  output logic [WAY_W-1:0] priority_q    [N_WAYS],
  output logic [DEG_W-1:0] degree_q      [N_WAYS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_WAYS; i++) begin
        priority_q[i] <= WAY_W'(i);
        degree_q[i]   <= '0;
      end
    end else if (load_en) begin
      priority_q <= load_priority;
      degree_q   <= load_degree;
    end else if (wr_en) begin
      if (wr_sel) degree_q[wr_idx]   <= wr_data[DEG_W-1:0];
      else        priority_q[wr_idx] <= wr_data[WAY_W-1:0];
    end
  end

endmodule
