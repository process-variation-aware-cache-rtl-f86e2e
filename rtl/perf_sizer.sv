// perf_sizer -- picks the fewest ways that keep the slowdown within a bound.
//
// The static sizing policy for a fixed performance level: disable as many
// ways as possible while the workload's slowdown stays at or below
// max_slowdown (for example 1.02 for a 2% performance loss). Given the
// profiled slowdown table (slowdown[j] = relative run time with j+1 ways on)
// the result k is the smallest number of ways whose slowdown does not exceed
// the bound; if no entry qualifies, all N_WAYS ways are kept. Which ways are
// then enabled is left to way_select_policy (the k least leaky ones).
//
// Purely combinational. Slowdown values are unsigned fixed point with
// SLOW_FRAC fraction bits (1.0 = 4096 by default). The rule follows the
// published static policy; the table format and the fall-back to all ways
// are this design's choices.
module perf_sizer #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned SLOW_W = 16,
  localparam int unsigned K_W   = $clog2(N_WAYS + 1)
) (
  input  logic [SLOW_W-1:0] slowdown [N_WAYS],
  input  logic [SLOW_W-1:0] max_slowdown,
  output logic [K_W-1:0]    k
);

  always_comb begin
    k = K_W'(N_WAYS);
    for (int j = N_WAYS-1; j >= 0; j--) begin
      if (slowdown[j] <= max_slowdown) k = K_W'(j + 1);
    end
  end

endmodule
