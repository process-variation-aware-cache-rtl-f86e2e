// tb_wp_regs -- self-checking test of the PRIORITY and DEGREE registers.
// Checks reset contents, single-entry boot writes to both registers, the bulk
// load from the profiler and that a bulk load wins over a write.
module tb_wp_regs;
  localparam int N = 16, DEG_W = 4, WAY_W = 4;
  logic clk = 0, rst_n, wr_en, wr_sel, load_en;
  logic [WAY_W-1:0] wr_idx;
  logic [3:0] wr_data;
  logic [WAY_W-1:0] load_priority [N], priority_q [N], mp [N];
  logic [DEG_W-1:0] load_degree [N], degree_q [N], md [N];
  int checks = 0, failures = 0;

  wp_regs #(.N_WAYS(N), .DEG_W(DEG_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (priority_q[i] !== mp[i] || degree_q[i] !== md[i]) begin
        failures++;
        $display("%s entry %0d: pri %0d/%0d deg %0d/%0d", what, i, priority_q[i], mp[i], degree_q[i], md[i]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_sel = 0; wr_idx = 0; wr_data = 0; load_en = 0;
    for (int i = 0; i < N; i++) begin load_priority[i] = 0; load_degree[i] = 0; end
    rst_n = 0; #12 rst_n = 1;
    for (int i = 0; i < N; i++) begin mp[i] = WAY_W'(i); md[i] = 0; end
    @(negedge clk); compare("reset");
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wr_en = 1; wr_sel = $urandom; wr_idx = WAY_W'($urandom); wr_data = 4'($urandom);
      if (wr_sel) md[wr_idx] = wr_data; else mp[wr_idx] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    compare("write");
    for (int i = 0; i < N; i++) begin
      load_priority[i] = WAY_W'(N - 1 - i); load_degree[i] = DEG_W'($urandom);
      mp[i] = load_priority[i]; md[i] = load_degree[i];
    end
    load_en = 1; wr_en = 1; wr_sel = 0; wr_idx = 0; wr_data = 4'd7;
    @(negedge clk); load_en = 0; wr_en = 0;
    compare("load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
