// wp_l3_cache -- 16 MB, 16-way L3 cache with way prioritization.
//
// Process variation makes some regions of a large cache leak far more than
// others. This cache keeps each way in its own supply-gated sub-array, so a
// disabled way stops leaking, and chooses *which* ways to disable from a
// per-chip leakage ranking: the PRIORITY register lists the physical ways from
// most to least leaky, the DEGREE register their quantized leakage. When the
// cache is sized to k ways, the k least leaky ways stay on.
//
// Blocks: tag_array and data_array (one gated sub-array per way),
// decode_logic (tag match over enabled ways), data_select (way multiplexer),
// cache_ctrl (requests, misses, resize sweep, way mask, supply enables),
// wp_regs (PRIORITY/DEGREE), way_select_policy (k -> mask), perf_sizer
// (k for a slowdown bound), ed_sizer (energy-delay search for k) and
// leak_profiler (self-test that measures,
// ranks and quantizes way leakage).
//
// Interface and timing:
//   req_*/rsp_*   line requests from the level above (see cache_ctrl); hits
//                 answer HIT_LATENCY cycles after acceptance.
//   mem_*         line traffic to the next level (write-backs and fills).
//   cfg_*         boot-time writes of PRIORITY (cfg_sel=0) or DEGREE
//                 (cfg_sel=1) entries, e.g. from off-chip non-volatile storage.
//   size_req      pulse with size_k: resize to the k least leaky ways.
//   perf_req      pulse with max_slowdown and slowdown[]: resize to the fewest
//                 (least leaky) ways whose profiled slowdown is within bound.
//   ed_start      pulse with core_power and slowdown[]: search the k with the
//                 lowest energy-delay, then resize to it (ed_done, ed_best_k).
//   bist_start    runs the leakage self-test; the external current reading
//                 comes in on meas_*; at the end the ranking is loaded into
//                 the registers and shown on prof_priority/prof_degree.
//   way_mask / pwr_en give the enabled ways and the supply-gate controls.
// Sizing requests are latched and applied when the controller is idle; one
// that arrives during a resize is applied after it, and a new one replaces an
// older one that has not started yet.
// The organisation follows the published way-prioritized cache; the request
// interfaces and the glue between sizing and resizing are this design's own.
module wp_l3_cache
  import wp_pkg::*;
#(
  parameter int unsigned N_WAYS      = wp_pkg::WP_N_WAYS,
  parameter int unsigned CACHE_BYTES = wp_pkg::WP_CACHE_BYTES,
  parameter int unsigned LINE_BYTES  = wp_pkg::WP_LINE_BYTES,
  parameter int unsigned ADDR_W      = wp_pkg::WP_ADDR_W,
  parameter int unsigned HIT_LATENCY = wp_pkg::WP_HIT_LATENCY,
  parameter int unsigned DEG_W       = wp_pkg::WP_DEG_W,
  parameter int unsigned POWER_W     = wp_pkg::WP_POWER_W,
  parameter int unsigned SLOW_W      = wp_pkg::WP_SLOW_W,
  parameter int unsigned MEAS_W      = 16,
  parameter int unsigned QSHIFT      = 8,
  parameter int unsigned SETTLE      = 16,
  localparam int unsigned SETS   = CACHE_BYTES / (LINE_BYTES * N_WAYS),
  localparam int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned ENT_W  = TAG_W + 2,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned WAY_W  = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned K_W    = $clog2(N_WAYS + 1),
  localparam int unsigned WR_W   = (WAY_W > DEG_W) ? WAY_W : DEG_W,
  localparam int unsigned ED_W   = POWER_W + 1 + 2*SLOW_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // level above
  input  logic               req_valid,
  output logic               req_ready,
  input  cache_op_e          req_op,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic [LINE_W-1:0]  req_wline,
  output logic               rsp_valid,
  output logic [LINE_W-1:0]  rsp_rline,
  output logic               rsp_hit,
  // next level
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output logic [LINE_W-1:0]  mem_req_wline,
  input  logic               mem_rsp_valid,
  input  logic [LINE_W-1:0]  mem_rsp_rline,
  // boot configuration of PRIORITY / DEGREE
  input  logic               cfg_we,
  input  logic               cfg_sel,
  input  logic [WAY_W-1:0]   cfg_idx,
  input  logic [WR_W-1:0]    cfg_wdata,
  output logic [WAY_W-1:0]   priority_q [N_WAYS],
  output logic [DEG_W-1:0]   degree_q   [N_WAYS],
  // sizing
  input  logic               size_req,
  input  logic [K_W-1:0]     size_k,
  input  logic               perf_req,
  input  logic [SLOW_W-1:0]  max_slowdown,
  output logic [K_W-1:0]     perf_k,
  input  logic               ed_start,
  input  logic [POWER_W-1:0] core_power,
  input  logic [SLOW_W-1:0]  slowdown [N_WAYS],
  output logic               ed_busy,
  output logic               ed_done,
  output logic [K_W-1:0]     ed_best_k,
  output logic [ED_W-1:0]    ed_best_ed,
  output logic [K_W-1:0]     ed_steps,
  output logic [K_W-1:0]     active_k,
  output logic               resize_busy,
  output logic               resize_done,
  output logic [N_WAYS-1:0]  way_mask,
  output logic [N_WAYS-1:0]  pwr_en,
  // leakage self-test
  input  logic               bist_start,
  output logic               bist_active,
  output logic               meas_req,
  input  logic               meas_valid,
  input  logic [MEAS_W-1:0]  meas_value,
  output logic               prof_done,
  output logic [WAY_W-1:0]   prof_priority [N_WAYS],
  output logic [DEG_W-1:0]   prof_degree   [N_WAYS],
  // event strobes
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_victim_wb,
  output logic               ev_resize_wb,
  output logic               ev_stall
);

  // ---------------------------------------------------------------- arrays
  logic [N_WAYS-1:0] ctrl_pwr, bist_pwr, arr_pwr;
  logic              arr_rd_en;
  logic [IDX_W-1:0]  arr_index;
  logic [N_WAYS-1:0] tag_we_ways, data_we_ways;
  logic [ENT_W-1:0]  tag_wr_entry;
  logic [ENT_W-1:0]  tag_rd_entry [N_WAYS];
  logic [LINE_W-1:0] data_wr_line;
  logic [LINE_W-1:0] data_rd_line [N_WAYS];

  assign arr_pwr = bist_active ? bist_pwr : ctrl_pwr;
  assign pwr_en  = arr_pwr;

  tag_array #(.N_WAYS(N_WAYS), .SETS(SETS), .TAG_W(TAG_W)) u_tags (
    .clk(clk), .pwr_en(arr_pwr), .rd_en(arr_rd_en), .index(arr_index),
    .we_ways(tag_we_ways), .wr_entry(tag_wr_entry), .rd_entry(tag_rd_entry)
  );

  data_array #(.N_WAYS(N_WAYS), .SETS(SETS), .LINE_W(LINE_W)) u_data (
    .clk(clk), .pwr_en(arr_pwr), .rd_en(arr_rd_en), .index(arr_index),
    .we_ways(data_we_ways), .wr_line(data_wr_line), .rd_line(data_rd_line)
  );

  // ------------------------------------------------------ decode and select
  logic [ADDR_W-1:0] lookup_addr;
  logic [IDX_W-1:0]  req_index;
  logic [TAG_W-1:0]  req_tag;
  logic [N_WAYS-1:0] hit_vec, valid_vec, dirty_vec, dsel_onehot;
  logic              hit;
  logic [WAY_W-1:0]  hit_way;
  logic [LINE_W-1:0] sel_line;

  decode_logic #(.N_WAYS(N_WAYS), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W)) u_decode (
    .addr(lookup_addr), .way_mask(way_mask), .rd_entry(tag_rd_entry),
    .index(req_index), .tag(req_tag), .hit_vec(hit_vec), .hit(hit),
    .hit_way(hit_way), .valid_vec(valid_vec), .dirty_vec(dirty_vec)
  );

  data_select #(.N_WAYS(N_WAYS), .LINE_W(LINE_W)) u_select (
    .rd_line(data_rd_line), .sel_onehot(dsel_onehot), .line(sel_line)
  );

  // ------------------------------------------------------------ controller
  logic              resize_req, resize_ack;
  logic [N_WAYS-1:0] resize_mask;

  cache_ctrl #(.N_WAYS(N_WAYS), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W),
               .HIT_LATENCY(HIT_LATENCY)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_ready(req_ready), .req_op(req_op), .req_addr(req_addr),
    .req_wline(req_wline), .rsp_valid(rsp_valid), .rsp_rline(rsp_rline), .rsp_hit(rsp_hit),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req_we(mem_req_we),
    .mem_req_addr(mem_req_addr), .mem_req_wline(mem_req_wline),
    .mem_rsp_valid(mem_rsp_valid), .mem_rsp_rline(mem_rsp_rline),
    .resize_req(resize_req), .resize_mask(resize_mask), .resize_ack(resize_ack),
    .resize_busy(resize_busy),
    .resize_done(resize_done), .way_mask(way_mask), .pwr_en(ctrl_pwr),
    .bist_active(bist_active),
    .lookup_addr(lookup_addr), .arr_rd_en(arr_rd_en), .arr_index(arr_index),
    .tag_we_ways(tag_we_ways), .tag_wr_entry(tag_wr_entry), .tag_rd_entry(tag_rd_entry),
    .data_we_ways(data_we_ways), .data_wr_line(data_wr_line),
    .req_index(req_index), .req_tag(req_tag), .hit_vec(hit_vec), .hit(hit),
    .valid_vec(valid_vec), .dirty_vec(dirty_vec), .dsel_onehot(dsel_onehot),
    .sel_line(sel_line),
    .ev_hit(ev_hit), .ev_miss(ev_miss), .ev_victim_wb(ev_victim_wb),
    .ev_resize_wb(ev_resize_wb), .ev_stall(ev_stall)
  );

  // ------------------------------------------------- leakage registers
  wp_regs #(.N_WAYS(N_WAYS), .DEG_W(DEG_W)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .wr_en(cfg_we), .wr_sel(cfg_sel), .wr_idx(cfg_idx), .wr_data(cfg_wdata),
    .load_en(prof_done), .load_priority(prof_priority), .load_degree(prof_degree),
    .priority_q(priority_q), .degree_q(degree_q)
  );

  leak_profiler #(.N_WAYS(N_WAYS), .DEG_W(DEG_W), .MEAS_W(MEAS_W), .QSHIFT(QSHIFT),
                  .SETTLE(SETTLE)) u_prof (
    .clk(clk), .rst_n(rst_n), .start(bist_start), .bist_active(bist_active),
    .bist_pwr(bist_pwr), .meas_req(meas_req), .meas_valid(meas_valid),
    .meas_value(meas_value), .done(prof_done), .priority_out(prof_priority),
    .degree_out(prof_degree)
  );

  // ---------------------------------------------------------------- sizing
  logic [K_W-1:0] k_q, k_used, k_taken_q;
  logic           pend_q;

  ed_sizer #(.N_WAYS(N_WAYS), .DEG_W(DEG_W), .POWER_W(POWER_W), .SLOW_W(SLOW_W)) u_ed (
    .clk(clk), .rst_n(rst_n), .start(ed_start), .core_power(core_power),
    .degree_q(degree_q), .slowdown(slowdown), .busy(ed_busy), .done(ed_done),
    .best_k(ed_best_k), .best_ed(ed_best_ed), .steps(ed_steps)
  );

  perf_sizer #(.N_WAYS(N_WAYS), .SLOW_W(SLOW_W)) u_perf (
    .slowdown(slowdown), .max_slowdown(max_slowdown), .k(perf_k)
  );

  way_select_policy #(.N_WAYS(N_WAYS)) u_policy (
    .priority_q(priority_q), .k(k_q), .mask(resize_mask), .k_used(k_used)
  );

  // Latch the requested size; hand it to the controller once it is idle. A
  // request arriving during a resize waits and is applied after it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q       <= K_W'(N_WAYS);
      k_taken_q <= K_W'(N_WAYS);
      pend_q    <= 1'b0;
      active_k  <= K_W'(N_WAYS);
    end else begin
      if (ed_done)         begin k_q <= ed_best_k; pend_q <= 1'b1; end
      else if (size_req)   begin k_q <= size_k;    pend_q <= 1'b1; end
      else if (perf_req)   begin k_q <= perf_k;    pend_q <= 1'b1; end
      else if (resize_ack) pend_q <= 1'b0;
      if (resize_ack)  k_taken_q <= k_used;
      if (resize_done) active_k  <= k_taken_q;
    end
  end

  assign resize_req = pend_q;

endmodule
