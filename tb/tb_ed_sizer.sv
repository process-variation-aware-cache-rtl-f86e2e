// tb_ed_sizer -- self-checking test of the energy-delay size search.
// Random DEGREE profiles and decreasing slowdown curves; a reference search
// in the testbench gives the expected best k, best ED and number of steps.
// The step count is also checked against the measured busy time (one step per
// clock), and both an early stop and a full N-step search must occur.
module tb_ed_sizer;
  localparam int N = 16, DEG_W = 4, POWER_W = 16, SLOW_W = 16, K_W = 5;
  localparam int ED_W = POWER_W + 1 + 2*SLOW_W;
  logic clk = 0, rst_n, start, busy, done;
  logic [POWER_W-1:0] core_power;
  logic [DEG_W-1:0] degree_q [N];
  logic [SLOW_W-1:0] slowdown [N];
  logic [K_W-1:0] best_k, steps;
  logic [ED_W-1:0] best_ed;
  int checks = 0, failures = 0, n_early = 0, n_full = 0;

  ed_sizer #(.N_WAYS(N), .DEG_W(DEG_W), .POWER_W(POWER_W), .SLOW_W(SLOW_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; core_power = 0;
    for (int i = 0; i < N; i++) begin degree_q[i] = 0; slowdown[i] = 0; end
    rst_n = 0; #12 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint unsigned p, ed, bed;
      int bk, st, cycles;
      // leakage sorted most to least leaky, as the registers hold it
      degree_q[N-1] = DEG_W'(1 + $urandom % 4);
      for (int i = N-2; i >= 0; i--) begin
        int d;
        d = int'(degree_q[i+1]) + $urandom % 3;
        degree_q[i] = DEG_W'(d > 15 ? 15 : d);
      end
      core_power = POWER_W'((t % 3 == 0) ? 2000 + $urandom % 2000 : 20 + $urandom % 200);
      slowdown[N-1] = 16'd4096;
      for (int i = N-2; i >= 0; i--) slowdown[i] = slowdown[i+1] + 16'($urandom % ((t % 3 == 0) ? 300 : 6));
      // reference search
      p = core_power; bk = 0; bed = 0; st = 0;
      for (int k = 1; k <= N; k++) begin
        p += degree_q[N-k];
        ed = p * slowdown[k-1] * slowdown[k-1];
        st++;
        if (k == 1 || ed < bed) begin bed = ed; bk = k; end
        else if (ed > bed) break;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (int'(best_k) != bk || best_ed != ED_W'(bed) || int'(steps) != st) begin
        failures++;
        $display("t=%0d best_k %0d/%0d ed %0d/%0d steps %0d/%0d", t, best_k, bk, best_ed, bed, steps, st);
      end
      checks++;
      if (cycles != st) begin failures++; $display("took %0d cycles for %0d steps", cycles, st); end
      if (st < N) n_early++; else n_full++;
    end
    checks++;
    if (n_early == 0 || n_full == 0) begin failures++; $display("early %0d full %0d", n_early, n_full); end
    $display("early stops %0d, full searches %0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
