// tb_wp_l3_cache -- end-to-end test of the way-prioritized L3 cache.
//
// Runs the whole life of a chip: power-up invalidation, boot-time loading of
// PRIORITY/DEGREE through the configuration port, the leakage self-test
// (which replaces them with a measured ranking), line traffic, resizing to k
// ways (including a request for 0 ways that is clamped to 1), two
// energy-delay searches that pick k and resize, sizing to the fewest ways
// within a 2% slowdown bound, a request queued behind a running resize, and
// growing back to all ways, with traffic
// between the steps.
// Checks: every read returns the latest data; hits answer in HIT_LATENCY
// cycles; the enabled ways are exactly the k least leaky ways of the chip
// model, so their true leakage is the minimum over all k-way choices; the
// energy-delay choice matches a reference search; no data is ever written
// to a disabled way. Each mechanism must occur at least once.
module tb_wp_l3_cache;
  import wp_pkg::*;
  localparam int N = 16, LINE_BYTES = 8, SETS = 8, ADDR_W = 14;
  localparam int CACHE_BYTES = N * SETS * LINE_BYTES;
  localparam int N_TAGS = 24, N_IDX = SETS, N_OPS = 1500;
  localparam int HIT_LATENCY = WP_HIT_LATENCY, MEAS_W = 16, QSHIFT = 8;
  localparam int IDX_W = $clog2(SETS), OFF_W = $clog2(LINE_BYTES), TAG_W = ADDR_W - IDX_W - OFF_W;
  localparam int LINE_W = LINE_BYTES * 8, WAY_W = 4, K_W = 5, DEG_W = WP_DEG_W;
  localparam int POWER_W = WP_POWER_W, SLOW_W = WP_SLOW_W, ED_W = POWER_W + 1 + 2*SLOW_W;
  logic clk = 0, rst_n;
  logic req_valid, req_ready, rsp_valid, rsp_hit;
  cache_op_e req_op;
  logic [ADDR_W-1:0] req_addr, mem_req_addr;
  logic [LINE_W-1:0] req_wline, rsp_rline, mem_req_wline, mem_rsp_rline;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic cfg_we, cfg_sel;
  logic [WAY_W-1:0] cfg_idx;
  logic [3:0] cfg_wdata;
  logic [WAY_W-1:0] priority_q [N], prof_priority [N];
  logic [DEG_W-1:0] degree_q [N], prof_degree [N];
  logic size_req, ed_start, ed_busy, ed_done, resize_busy, resize_done;
  logic [K_W-1:0] size_k, ed_best_k, ed_steps, active_k;
  logic [POWER_W-1:0] core_power;
  logic perf_req;
  logic [SLOW_W-1:0] max_slowdown;
  logic [K_W-1:0] perf_k;
  logic [SLOW_W-1:0] slowdown [N];
  logic [ED_W-1:0] ed_best_ed;
  logic [N-1:0] way_mask, pwr_en;
  logic bist_start, bist_active, meas_req, meas_valid, prof_done;
  logic [MEAS_W-1:0] meas_value;
  logic ev_hit, ev_miss, ev_victim_wb, ev_resize_wb, ev_stall;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_vwb = 0, n_rwb = 0, n_stall = 0, n_shrink = 0, n_grow = 0;
  int n_boot = 0, n_bist = 0, n_fixed = 0, n_ed = 0, n_ed_early = 0, n_clamp = 0, n_perf = 0, n_queued = 0;
  logic [LINE_W-1:0] golden [logic [ADDR_W-1:0]];
  int leak [N];         // true leakage of each physical way in the chip model
  int base_current;
  event probe_ev;       // starts a request that races a resize
  bit   probe_done;

  initial forever begin
    @probe_ev;
    access(OP_READ, rand_addr());
    probe_done = 1;
  end

  tb_mem_model #(.ADDR_W(ADDR_W), .LINE_W(LINE_W), .LAT(8)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wline(mem_req_wline), .rsp_valid(mem_rsp_valid),
    .rsp_rline(mem_rsp_rline));

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // chip current: baseline plus the leakage of every powered way
  always @(posedge clk) begin
    meas_valid <= 1'b0;
    if (meas_req && !meas_valid) begin
      int sum;
      sum = base_current;
      for (int w = 0; w < N; w++) if (pwr_en[w]) sum += leak[w];
      meas_valid <= 1'b1;
      meas_value <= MEAS_W'(sum);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_victim_wb) n_vwb++;
    if (ev_resize_wb) n_rwb++;
    if (ev_stall) n_stall++;
    if ((dut.data_we_ways & ~way_mask) != 0) begin
      failures++; $display("data written into disabled way %b (mask %b)", dut.data_we_ways, way_mask);
    end
  end

  function automatic logic [LINE_W-1:0] gold(input logic [ADDR_W-1:0] a);
    return golden.exists(a) ? golden[a] : u_mem.init_line(a);
  endfunction

  function automatic logic [ADDR_W-1:0] rand_addr();
    logic [TAG_W-1:0] t;
    logic [IDX_W-1:0] i;
    t = TAG_W'($urandom % N_TAGS);
    i = IDX_W'($urandom % N_IDX);
    return {t, i, OFF_W'(0)};
  endfunction

  task automatic access(input cache_op_e op, input logic [ADDR_W-1:0] a);
    int lat;
    logic [LINE_W-1:0] wl;
    for (int i = 0; i < LINE_W; i += 32) wl[i +: 32] = $urandom;
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wline = wl;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    if (op == OP_WRITE) golden[a] = wl;
    checks++;
    if (op == OP_READ && rsp_rline !== gold(a)) begin
      failures++; $display("read %h returned wrong data", a);
    end
    if (rsp_hit) begin
      checks++;
      if (lat != HIT_LATENCY) begin failures++; $display("hit latency %0d", lat); end
    end
  endtask

  task automatic traffic(input int n);
    for (int t = 0; t < n; t++) access(($urandom % 10 < 4) ? OP_WRITE : OP_READ, rand_addr());
  endtask

  // the k least leaky ways of the chip model, as a mask
  function automatic logic [N-1:0] least_leaky(input int k);
    logic [N-1:0] m;
    m = '0;
    for (int w = 0; w < N; w++) begin
      int r;
      r = 0;
      for (int v = 0; v < N; v++) if (leak[v] > leak[w] || (leak[v] == leak[w] && v < w)) r++;
      if (r >= N - k) m[w] = 1'b1;
    end
    return m;
  endfunction

  task automatic wait_resize(input logic [N-1:0] old_mask, input logic [N-1:0] exp_mask, input string what);
    while (!resize_done) @(negedge clk);
    @(negedge clk);
    if ((old_mask & ~exp_mask) != 0) n_shrink++;
    if ((exp_mask & ~old_mask) != 0) n_grow++;
    checks++;
    if (way_mask !== exp_mask || pwr_en !== exp_mask) begin
      failures++; $display("%s: mask %b pwr %b exp %b", what, way_mask, pwr_en, exp_mask);
    end
  endtask

  task automatic size_to(input int k);
    logic [N-1:0] old, exp;
    int ke, sum_on, sum_best;
    old = way_mask;
    ke = (k < 1) ? 1 : k;
    exp = least_leaky(ke);
    @(negedge clk); size_req = 1; size_k = K_W'(k);
    @(negedge clk); size_req = 0;
    // a request issued while the resize runs has to wait
    probe_done = 0;
    -> probe_ev;
    wait_resize(old, exp, "fixed sizing");
    while (!probe_done) @(negedge clk);
    n_fixed++;
    if (k < 1) n_clamp++;
    checks++;
    if (int'(active_k) != ke) begin failures++; $display("active_k %0d exp %0d", active_k, ke); end
    sum_on = 0;
    for (int w = 0; w < N; w++) if (way_mask[w]) sum_on += leak[w];
    // no other choice of ke ways leaks less
    sum_best = 0;
    for (int w = 0; w < N; w++) if (exp[w]) sum_best += leak[w];
    checks++;
    if (sum_on != sum_best) begin failures++; $display("leakage %0d exp %0d", sum_on, sum_best); end
  endtask

  task automatic ed_size(input int cp, input int steep);
    logic [N-1:0] old;
    longint unsigned p, ed, bed;
    int bk, st;
    core_power = POWER_W'(cp);
    slowdown[N-1] = SLOW_W'(1 << WP_SLOW_FRAC);
    for (int i = N-2; i >= 0; i--) slowdown[i] = slowdown[i+1] + SLOW_W'(steep * (i < 4 ? 4 : 1));
    p = cp; bk = 0; bed = 0; st = 0;
    for (int k = 1; k <= N; k++) begin
      p += degree_q[N-k];
      ed = p * slowdown[k-1] * slowdown[k-1];
      st++;
      if (k == 1 || ed < bed) begin bed = ed; bk = k; end
      else if (ed > bed) break;
    end
    old = way_mask;
    @(negedge clk); ed_start = 1;
    @(negedge clk); ed_start = 0;
    while (!ed_done) @(negedge clk);
    checks++;
    if (int'(ed_best_k) != bk || int'(ed_steps) != st) begin
      failures++; $display("ED best_k %0d exp %0d steps %0d exp %0d", ed_best_k, bk, ed_steps, st);
    end
    if (st < N) n_ed_early++;
    wait_resize(old, least_leaky(bk), "energy-delay sizing");
    n_ed++;
  endtask

  // a second request issued while a resize runs is applied after it
  task automatic size_queued(input int k1, input int k2);
    logic [N-1:0] old;
    old = way_mask;
    @(negedge clk); size_req = 1; size_k = K_W'(k1);
    @(negedge clk); size_req = 0;
    while (!resize_busy) @(negedge clk);
    repeat (3) @(negedge clk);
    size_req = 1; size_k = K_W'(k2);
    @(negedge clk); size_req = 0;
    // the second resize starts right after the first, so only the mask is
    // compared here (the supply already covers both masks)
    while (!resize_done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (way_mask !== least_leaky(k1)) begin
      failures++; $display("first of two requests: mask %b exp %b", way_mask, least_leaky(k1));
    end
    wait_resize(least_leaky(k1), least_leaky(k2), "request queued during a resize");
    checks++;
    if (int'(active_k) != k2) begin failures++; $display("active_k %0d exp %0d", active_k, k2); end
    n_queued++;
  endtask

  // static policy: fewest ways whose profiled slowdown is within 2%
  task automatic perf_size();
    logic [N-1:0] old;
    int ke;
    slowdown[N-1] = SLOW_W'(1 << WP_SLOW_FRAC);
    for (int i = N-2; i >= 0; i--) slowdown[i] = slowdown[i+1] + SLOW_W'(i < 6 ? 200 : 9);
    max_slowdown = SLOW_W'(((1 << WP_SLOW_FRAC) * 102) / 100);
    ke = N;
    for (int j = 0; j < N; j++) if (slowdown[j] <= max_slowdown) begin ke = j + 1; break; end
    old = way_mask;
    @(negedge clk); perf_req = 1;
    @(negedge clk); perf_req = 0;
    checks++;
    if (int'(perf_k) != ke) begin failures++; $display("2%% bound gives %0d ways, exp %0d", perf_k, ke); end
    wait_resize(old, least_leaky(ke), "slowdown-bound sizing");
    n_perf++;
  endtask

  initial begin
    perf_req = 0; max_slowdown = 0;
    req_valid = 0; req_op = OP_READ; req_addr = 0; req_wline = 0;
    cfg_we = 0; cfg_sel = 0; cfg_idx = 0; cfg_wdata = 0;
    size_req = 0; size_k = 0; ed_start = 0; core_power = 0; bist_start = 0;
    meas_valid = 0; meas_value = 0;
    for (int i = 0; i < N; i++) slowdown[i] = 0;
    base_current = 3000;
    for (int w = 0; w < N; w++) leak[w] = 100 + $urandom % 3500;
    rst_n = 0; #22 rst_n = 1;

    // boot: PRIORITY/DEGREE from non-volatile storage (here: reversed order)
    for (int i = 0; i < N; i++) begin
      @(negedge clk); cfg_we = 1; cfg_sel = 0; cfg_idx = WAY_W'(i); cfg_wdata = 4'(N - 1 - i);
      @(negedge clk); cfg_sel = 1; cfg_wdata = 4'(N - i);
    end
    @(negedge clk); cfg_we = 0;
    checks++;
    for (int i = 0; i < N; i++)
      if (int'(priority_q[i]) != N - 1 - i || int'(degree_q[i]) != ((N - i) & 15)) begin
        failures++; $display("boot write of entry %0d lost", i); break;
      end
    n_boot++;

    traffic(N_OPS / 4);

    // leakage self-test: ranking and degrees replace the boot values
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    while (!prof_done) @(negedge clk);
    @(negedge clk);
    n_bist++;
    for (int w = 0; w < N; w++) begin
      int r, q;
      r = 0;
      for (int v = 0; v < N; v++) if (leak[v] > leak[w] || (leak[v] == leak[w] && v < w)) r++;
      q = (leak[w] + (1 << QSHIFT) - 1) >> QSHIFT;
      if (q > 15) q = 15;
      checks++;
      if (int'(priority_q[r]) != w || int'(degree_q[r]) != q) begin
        failures++; $display("rank %0d holds way %0d deg %0d, exp way %0d deg %0d", r, priority_q[r], degree_q[r], w, q);
      end
    end
    // the cache contents did not survive the self-test: only what reached
    // the next level is left
    golden = u_mem.store;
    traffic(N_OPS / 4);

    size_to(5);
    traffic(N_OPS / 4);
    size_to(0);
    traffic(N_OPS / 8);
    ed_size(60, 400);     // steep slowdown: large cache wins
    traffic(N_OPS / 8);
    ed_size(3000, 3);     // flat slowdown: small cache wins
    perf_size();
    traffic(N_OPS / 8);
    size_queued(3, 9);
    traffic(N_OPS / 8);
    size_to(N);
    traffic(N_OPS / 8);

    checks++;
    if (n_hit == 0 || n_miss == 0 || n_vwb == 0 || n_rwb == 0 || n_stall == 0 || n_shrink == 0 ||
        n_grow == 0 || n_boot == 0 || n_bist == 0 || n_fixed == 0 || n_ed == 0 || n_ed_early == 0 ||
        n_clamp == 0 || n_perf == 0 || n_queued == 0) failures++;
    $display("hits %0d misses %0d victim_wb %0d resize_wb %0d stall_cycles %0d shrink %0d grow %0d",
             n_hit, n_miss, n_vwb, n_rwb, n_stall, n_shrink, n_grow);
    $display("boot %0d bist %0d fixed %0d clamp %0d ed %0d ed_early %0d perf %0d queued %0d",
             n_boot, n_bist, n_fixed, n_clamp, n_ed, n_ed_early, n_perf, n_queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  wp_l3_cache #(.N_WAYS(N), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES),
                .ADDR_W(ADDR_W), .SETTLE(4)) dut (.*);
endmodule
