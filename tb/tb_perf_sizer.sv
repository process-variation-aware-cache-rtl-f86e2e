// tb_perf_sizer -- self-checking test of the slowdown-bound sizing rule.
// Random decreasing slowdown tables and bounds; the expected k (fewest ways
// within the bound, all ways if none) is computed in the testbench.
module tb_perf_sizer;
  localparam int N = 16, SLOW_W = 16, K_W = 5;
  logic [SLOW_W-1:0] slowdown [N];
  logic [SLOW_W-1:0] max_slowdown;
  logic [K_W-1:0] k;
  int checks = 0, failures = 0;

  perf_sizer #(.N_WAYS(N), .SLOW_W(SLOW_W)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int ke;
      slowdown[N-1] = SLOW_W'(4096 + (t % 5 == 0 ? 200 : 0));
      for (int i = N-2; i >= 0; i--) slowdown[i] = slowdown[i+1] + SLOW_W'($urandom % 150);
      max_slowdown = SLOW_W'(4096 + $urandom % 600);
      ke = N;
      for (int j = 0; j < N; j++) if (slowdown[j] <= max_slowdown) begin ke = j + 1; break; end
      #1;
      checks++;
      if (int'(k) != ke) begin failures++; $display("k %0d exp %0d", k, ke); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
