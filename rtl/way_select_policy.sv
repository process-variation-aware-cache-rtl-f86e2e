// way_select_policy -- turns "k ways wanted" into a way enable/disable mask.
//
// The fixed-performance sizing rule of way prioritization: a working-set
// profile gives k, the number of ways the workload needs; the ways enabled are
// the last k entries of the PRIORITY register, i.e. the k least leaky physical
// ways, and every other way is disabled. mask[w] = 1 if physical way w is
// named by PRIORITY[N_WAYS-k .. N_WAYS-1].
//
// Purely combinational. k is clamped to 1..N_WAYS: this design always keeps at
// least one way on (a fully closed cache would need a bypass path that the
// published scheme does not describe); the clamp is this design's choice.
module way_select_policy #(
  parameter int unsigned N_WAYS = 16,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned K_W   = $clog2(N_WAYS + 1)
) (
  input  logic [WAY_W-1:0]  priority_q [N_WAYS],
  input  logic [K_W-1:0]    k,
  output logic [N_WAYS-1:0] mask,
  output logic [K_W-1:0]    k_used
);

  always_comb begin
    if (k == '0)                  k_used = K_W'(1);
    else if (k > K_W'(N_WAYS))    k_used = K_W'(N_WAYS);
    else                          k_used = k;
    mask = '0;
    for (int i = 0; i < N_WAYS; i++) begin
      if (i >= N_WAYS - int'(k_used)) mask[priority_q[i]] = 1'b1;
    end
  end

endmodule
