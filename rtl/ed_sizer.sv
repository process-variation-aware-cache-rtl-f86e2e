// ed_sizer -- finds the number of enabled ways that minimises energy-delay.
//
// For a workload whose slowdown at every cache size is known from profiling,
// the energy-delay product with k ways on is
//     ED(k) = (P_core + sum of DEGREE over the k least leaky ways) * slowdown(k)^2
// The search starts with the single least leaky way (DEGREE[N-1]) and adds one
// way per step in PRIORITY order (DEGREE[N-2], DEGREE[N-3], ...). Because the
// ways are pre-sorted by leakage, no other combination of ways needs to be
// tried. The search stops at the first step whose ED is larger than the best
// so far (power grows and delay shrinks with size, so the minimum has been
// passed); in the worst case all N_WAYS steps are made.
//
// Interface and timing: pulse start (with core_power and slowdown[] stable
// until done). One step per clock; done pulses for one cycle with best_k, the
// winning ED in best_ed and the number of steps made in steps. slowdown[j] is
// the relative delay with j+1 ways on, unsigned fixed point with SLOW_FRAC
// fraction bits; core_power is in DEGREE units.
// The ED formula, the starting point and the early stop follow the published
// policy; the fixed-point formats and keeping the smaller k on a tie are this
// design's choices.
module ed_sizer #(
  parameter int unsigned N_WAYS    = 16,
  parameter int unsigned DEG_W     = 4,
  parameter int unsigned POWER_W   = 16,
  parameter int unsigned SLOW_W    = 16,
  localparam int unsigned K_W      = $clog2(N_WAYS + 1),
  localparam int unsigned PSUM_W   = POWER_W + 1,
  localparam int unsigned ED_W     = PSUM_W + 2*SLOW_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [POWER_W-1:0] core_power,
  input  logic [DEG_W-1:0]   degree_q [N_WAYS],
  input  logic [SLOW_W-1:0]  slowdown [N_WAYS],
  output logic               busy,
  output logic               done,
  output logic [K_W-1:0]     best_k,
  output logic [ED_W-1:0]    best_ed,
  output logic [K_W-1:0]     steps
);

  logic [K_W-1:0]    k_q;      // ways enabled in the step being evaluated
  logic [PSUM_W-1:0] psum_q;   // core power + leakage of ways before this step
  logic [PSUM_W-1:0] psum_k;
  logic [2*SLOW_W-1:0] s2;
  logic [ED_W-1:0]   ed_k;
  localparam int unsigned IDX_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1;
  logic [IDX_W-1:0]  deg_idx;    // DEGREE entry added in this step
  logic [IDX_W-1:0]  slow_idx;   // slowdown entry of this step

  always_comb begin
    deg_idx  = IDX_W'(N_WAYS - int'(k_q));
    slow_idx = IDX_W'(int'(k_q) - 1);
    if (k_q == '0) begin
      deg_idx  = '0;
      slow_idx = '0;
    end
    psum_k = psum_q + PSUM_W'(degree_q[deg_idx]);
    s2     = slowdown[slow_idx] * slowdown[slow_idx];
    ed_k   = ED_W'(psum_k) * ED_W'(s2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      k_q     <= '0;
      psum_q  <= '0;
      best_k  <= '0;
      best_ed <= '0;
      steps   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          k_q    <= K_W'(1);
          psum_q <= PSUM_W'(core_power);
          steps  <= '0;
        end
      end else begin
        steps  <= steps + 1'b1;
        psum_q <= psum_k;
        if (k_q == K_W'(1) || ed_k < best_ed) begin
          best_k  <= k_q;
          best_ed <= ed_k;
        end
        if ((k_q != K_W'(1) && ed_k > best_ed) || k_q == K_W'(N_WAYS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          k_q <= k_q + 1'b1;
        end
      end
    end
  end

endmodule
