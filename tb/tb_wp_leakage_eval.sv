// tb_wp_leakage_eval -- leakage and energy-delay evaluation of way prioritization.
//
// For several synthetic chips (random per-way leakage with a few very leaky
// ways), the cache runs its self-test and is then sized to every k from 1 to
// 16. For each k the testbench sums the true leakage of the enabled ways and
// compares it with two variation-unaware choices of k ways: the average case
// (k/16 of the total, what an arbitrary choice gives on average) and the
// worst case (the k leakiest ways). Way prioritization must equal the best
// possible choice for every k. Average savings are printed.
//
// It then runs the energy-delay search with the cache's leakage taken as 20%
// of the total power (core_power = 4 x sum of DEGREE) and a profiled slowdown
// curve, checks the chosen k against a reference search, and reports how far
// it is from the exhaustive optimum. Cache size is reduced to 8 sets per way
// so that each resize is short; the way count is the full 16.
module tb_wp_leakage_eval;
  import wp_pkg::*;
  localparam int N = 16, LINE_BYTES = 8, SETS = 8, ADDR_W = 14, N_CHIPS = 6;
  localparam int CACHE_BYTES = N * SETS * LINE_BYTES;
  localparam int LINE_W = LINE_BYTES * 8, WAY_W = 4, K_W = 5, DEG_W = WP_DEG_W, MEAS_W = 16;
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
  int leak [N];
  real sum_pri = 0, sum_mean = 0, sum_worst = 0;
  int n_points = 0, n_ed_opt = 0;

  wp_l3_cache #(.N_WAYS(N), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES),
                .ADDR_W(ADDR_W), .SETTLE(2)) dut (.*);
  tb_mem_model #(.ADDR_W(ADDR_W), .LINE_W(LINE_W), .LAT(4)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wline(mem_req_wline), .rsp_valid(mem_rsp_valid),
    .rsp_rline(mem_rsp_rline));

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    meas_valid <= 1'b0;
    if (meas_req && !meas_valid) begin
      int sum;
      sum = 2000;
      for (int w = 0; w < N; w++) if (pwr_en[w]) sum += leak[w];
      meas_valid <= 1'b1;
      meas_value <= MEAS_W'(sum);
    end
  end

  // sum of the k smallest / largest leakages
  function automatic int extreme_sum(input int k, input bit largest);
    int s [N];
    int r;
    for (int i = 0; i < N; i++) s[i] = leak[i];
    s.sort();
    r = 0;
    for (int i = 0; i < k; i++) r += largest ? s[N-1-i] : s[i];
    return r;
  endfunction

  initial begin
    perf_req = 0; max_slowdown = 0;
    req_valid = 0; req_op = OP_READ; req_addr = 0; req_wline = 0;
    cfg_we = 0; cfg_sel = 0; cfg_idx = 0; cfg_wdata = 0;
    size_req = 0; size_k = 0; ed_start = 0; core_power = 0; bist_start = 0;
    for (int i = 0; i < N; i++) slowdown[i] = 0;
    rst_n = 0; #22 rst_n = 1;
    for (int chip = 0; chip < N_CHIPS; chip++) begin
      int total;
      total = 0;
      for (int w = 0; w < N; w++) begin
        // skewed distribution: most ways near nominal, a few far above
        leak[w] = 300 + ($urandom % 40) * ($urandom % 40) * (($urandom % 4 == 0) ? 3 : 1);
        total += leak[w];
      end
      @(negedge clk); bist_start = 1;
      @(negedge clk); bist_start = 0;
      while (!prof_done) @(negedge clk);
      for (int k = 1; k <= N; k++) begin
        int on;
        @(negedge clk); size_req = 1; size_k = K_W'(k);
        @(negedge clk); size_req = 0;
        while (!resize_done) @(negedge clk);
        @(negedge clk);
        on = 0;
        for (int w = 0; w < N; w++) if (way_mask[w]) on += leak[w];
        checks++;
        if ($countones(way_mask) != k || on != extreme_sum(k, 0)) begin
          failures++; $display("chip %0d k %0d: leakage %0d, best %0d", chip, k, on, extreme_sum(k, 0));
        end
        sum_pri   += real'(on) / real'(total);
        sum_mean  += real'(k) / real'(N);
        sum_worst += real'(extreme_sum(k, 1)) / real'(total);
        n_points++;
      end
      // energy-delay: cache leakage is 20% of the total power
      begin
        longint unsigned p, ed, bed, opt;
        int bk, sum_deg, kopt;
        sum_deg = 0;
        for (int i = 0; i < N; i++) sum_deg += degree_q[i];
        core_power = POWER_W'(4 * sum_deg);
        slowdown[N-1] = SLOW_W'(1 << WP_SLOW_FRAC);
        for (int i = N-2; i >= 0; i--) slowdown[i] = slowdown[i+1] + SLOW_W'(5 + chip * 15 + 4 * (N - 1 - i));
        p = core_power; bk = 0; bed = 0; opt = 0; kopt = 0;
        for (int k = 1; k <= N; k++) begin
          p += degree_q[N-k];
          ed = p * slowdown[k-1] * slowdown[k-1];
          if (k == 1 || ed < opt) begin opt = ed; kopt = k; end
        end
        p = core_power;
        for (int k = 1; k <= N; k++) begin
          p += degree_q[N-k];
          ed = p * slowdown[k-1] * slowdown[k-1];
          if (k == 1 || ed < bed) begin bed = ed; bk = k; end
          else if (ed > bed) break;
        end
        @(negedge clk); ed_start = 1;
        @(negedge clk); ed_start = 0;
        while (!ed_done) @(negedge clk);
        checks++;
        if (int'(ed_best_k) != bk) begin failures++; $display("ED k %0d exp %0d", ed_best_k, bk); end
        if (int'(ed_best_k) == kopt) n_ed_opt++;
        $display("chip %0d: energy-delay picks %0d ways (exhaustive optimum %0d ways)", chip, ed_best_k, kopt);
        while (!resize_done) @(negedge clk);
      end
    end
    $display("static power of enabled ways, mean over %0d sizes: prioritized %0.1f%%, unaware mean %0.1f%%, unaware worst %0.1f%%",
             n_points, 100.0 * sum_pri / n_points, 100.0 * sum_mean / n_points, 100.0 * sum_worst / n_points);
    $display("reduction versus unaware mean %0.1f%%, versus worst case %0.1f%%; ED search found the optimum for %0d of %0d chips",
             100.0 * (1.0 - sum_pri / sum_mean), 100.0 * (1.0 - sum_pri / sum_worst), n_ed_opt, N_CHIPS);
    checks++;
    if (!(sum_pri < sum_mean && sum_mean < sum_worst)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
