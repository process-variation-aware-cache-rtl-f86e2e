// tb_way_select_policy -- self-checking test of the fixed-performance sizing rule.
// For random PRIORITY permutations and every k, the mask must enable exactly
// the ways named by the last k PRIORITY entries (k clamped to 1..N).
module tb_way_select_policy;
  localparam int N = 16, WAY_W = 4, K_W = 5;
  logic [WAY_W-1:0] priority_q [N];
  logic [K_W-1:0] k, k_used;
  logic [N-1:0] mask;
  int checks = 0, failures = 0;

  way_select_policy #(.N_WAYS(N)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      int perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N-1; i > 0; i--) begin
        int j, tmp;
        j = $urandom % (i + 1); tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int i = 0; i < N; i++) priority_q[i] = WAY_W'(perm[i]);
      for (int kk = 0; kk <= N + 1; kk++) begin
        logic [N-1:0] exp;
        int ke;
        k = K_W'(kk);
        ke = (kk == 0) ? 1 : (kk > N ? N : kk);
        exp = '0;
        for (int r = 0; r < ke; r++) exp[perm[N-1-r]] = 1'b1;
        #1;
        checks++;
        if (mask !== exp || int'(k_used) != ke) begin
          failures++; $display("k=%0d mask %b exp %b", kk, mask, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
