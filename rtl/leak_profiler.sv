// leak_profiler -- built-in self-test sequence that measures and ranks way leakage.
//
// During manufacturing test, with the processor idle, the cache supply is
// switched so that first no way and then each single way in turn is powered.
// For every step an external measurement of total chip current (an ammeter
// reading, delivered through meas_req / meas_valid / meas_value) is taken. A
// way's leakage is its reading minus the all-ways-off baseline. The profiler
// then sorts the ways by decreasing leakage and quantizes each leakage to
// DEG_W bits, producing the contents of the PRIORITY and DEGREE registers.
//
// Sorting: each way's rank is the number of ways that leak more, or leak the
// same and have a smaller way number; PRIORITY[rank(w)] = w. Quantization:
// DEGREE = ceil(leakage / 2**QSHIFT), saturated at 2**DEG_W-1, so any way
// with measurable leakage gets a degree of at least 1.
//
// Interface and timing: pulse start. bist_active stays high for the whole
// sequence and bist_pwr gives the supply enables to apply. After each supply
// change the profiler waits SETTLE cycles, then raises meas_req until a cycle
// with meas_valid, whose meas_value it stores. After the last way it sorts in
// one cycle and pulses done; priority_out/degree_out then hold the result.
// Enabling ways one at a time in a self-test and sorting/quantizing the
// readings follow the published procedure; the baseline step, settling time,
// tie rule and quantization rule are this design's choices.
module leak_profiler #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned DEG_W  = 4,
  parameter int unsigned MEAS_W = 16,
  parameter int unsigned QSHIFT = 8,
  parameter int unsigned SETTLE = 16,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              bist_active,
  output logic [N_WAYS-1:0] bist_pwr,
  output logic              meas_req,
  input  logic              meas_valid,
  input  logic [MEAS_W-1:0] meas_value,
  output logic              done,
  output logic [WAY_W-1:0]  priority_out [N_WAYS],
  output logic [DEG_W-1:0]  degree_out   [N_WAYS]
);

  typedef enum logic [1:0] {P_IDLE, P_SETTLE, P_MEASURE, P_SORT} pstate_e;

  localparam int unsigned CNT_W = (SETTLE > 1) ? $clog2(SETTLE + 1) : 1;
  localparam int unsigned DMAX  = (1 << DEG_W) - 1;

  pstate_e           state_q;
  logic [WAY_W:0]    step_q;     // 0 = baseline, 1+w = way w on
  logic [CNT_W-1:0]  cnt_q;
  logic [MEAS_W-1:0] base_q;
  logic [MEAS_W-1:0] leak_q [N_WAYS];

  // Ranking and quantization, used in P_SORT.
  logic [WAY_W-1:0]  rank     [N_WAYS];
  logic [DEG_W-1:0]  quant    [N_WAYS];
  logic [MEAS_W:0]   rounded;

  always_comb begin
    for (int w = 0; w < N_WAYS; w++) begin
      rank[w] = '0;
      for (int v = 0; v < N_WAYS; v++) begin
        if ((leak_q[v] > leak_q[w]) || ((leak_q[v] == leak_q[w]) && (v < w)))
          rank[w] = rank[w] + 1'b1;
      end
      rounded = ({1'b0, leak_q[w]} + (MEAS_W+1)'((1 << QSHIFT) - 1)) >> QSHIFT;
      quant[w] = (rounded > (MEAS_W+1)'(DMAX)) ? DEG_W'(DMAX) : rounded[DEG_W-1:0];
    end
  end

  always_comb begin
    bist_pwr = '0;
    if (state_q == P_SETTLE || state_q == P_MEASURE) begin
      for (int w = 0; w < N_WAYS; w++) bist_pwr[w] = (int'(step_q) == w + 1);
    end
  end

  assign bist_active = (state_q != P_IDLE);
  assign meas_req    = (state_q == P_MEASURE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_IDLE;
      step_q  <= '0;
      cnt_q   <= '0;
      base_q  <= '0;
      done    <= 1'b0;
      for (int w = 0; w < N_WAYS; w++) begin
        leak_q[w]       <= '0;
        priority_out[w] <= WAY_W'(w);
        degree_out[w]   <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        P_IDLE: if (start) begin
          state_q <= P_SETTLE;
          step_q  <= '0;
          cnt_q   <= '0;
        end
        P_SETTLE: begin
          if (cnt_q >= CNT_W'(SETTLE - 1)) state_q <= P_MEASURE;
          else                             cnt_q <= cnt_q + 1'b1;
        end
        P_MEASURE: if (meas_valid) begin
          if (step_q == '0) base_q <= meas_value;
          else leak_q[WAY_W'(step_q - 1'b1)] <= (meas_value > base_q) ? meas_value - base_q : '0;
          cnt_q <= '0;
          if (int'(step_q) == N_WAYS) state_q <= P_SORT;
          else begin
            step_q  <= step_q + 1'b1;
            state_q <= P_SETTLE;
          end
        end
        P_SORT: begin
          for (int w = 0; w < N_WAYS; w++) begin
            priority_out[rank[w]] <= WAY_W'(w);
            degree_out[rank[w]]   <= quant[w];
          end
          done    <= 1'b1;
          state_q <= P_IDLE;
        end
        default: state_q <= P_IDLE;
      endcase
    end
  end

endmodule
