// tb_leak_profiler -- self-checking test of the leakage self-test sequence.
// A chip model answers each measurement with a baseline current plus the
// leakage of the ways that are powered. The testbench checks that exactly one
// way (or none, for the baseline) is powered at each measurement, and that the
// resulting ranking and quantized degrees match an independent computation.
module tb_leak_profiler;
  localparam int N = 16, DEG_W = 4, MEAS_W = 16, QSHIFT = 8, SETTLE = 3, WAY_W = 4;
  logic clk = 0, rst_n, start, bist_active, meas_req, meas_valid, done;
  logic [N-1:0] bist_pwr;
  logic [MEAS_W-1:0] meas_value;
  logic [WAY_W-1:0] priority_out [N];
  logic [DEG_W-1:0] degree_out [N];
  int leak [N];
  int base;
  int checks = 0, failures = 0, meas_count = 0;

  leak_profiler #(.N_WAYS(N), .DEG_W(DEG_W), .MEAS_W(MEAS_W), .QSHIFT(QSHIFT),
                  .SETTLE(SETTLE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // chip current model: answers a request two cycles later
  always @(posedge clk) begin
    meas_valid <= 1'b0;
    if (meas_req && !meas_valid && ($urandom % 2 == 0)) begin
      int sum;
      sum = base;
      for (int w = 0; w < N; w++) if (bist_pwr[w]) sum += leak[w];
      meas_valid <= 1'b1;
      meas_value <= MEAS_W'(sum);
      checks++;
      if (meas_count == 0 ? (bist_pwr != 0) : (bist_pwr != (N'(1) << (meas_count - 1)))) begin
        failures++; $display("measurement %0d with supply %b", meas_count, bist_pwr);
      end
      meas_count++;
    end
  end

  initial begin
    start = 0; meas_valid = 0; meas_value = 0;
    rst_n = 0; #12 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int rank_w [N];
      base = 5000 + $urandom % 1000;
      for (int w = 0; w < N; w++) leak[w] = (t == 0 && w < 4) ? 700 : 50 + $urandom % 5000;
      meas_count = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (meas_count != N + 1) begin failures++; $display("%0d measurements", meas_count); end
      for (int w = 0; w < N; w++) begin
        int r, q;
        r = 0;
        for (int v = 0; v < N; v++) if (leak[v] > leak[w] || (leak[v] == leak[w] && v < w)) r++;
        q = (leak[w] + (1 << QSHIFT) - 1) >> QSHIFT;
        if (q > 15) q = 15;
        checks++;
        if (int'(priority_out[r]) != w || int'(degree_out[r]) != q) begin
          failures++;
          $display("rank %0d: way %0d exp %0d, degree %0d exp %0d", r, priority_out[r], w, degree_out[r], q);
        end
      end
      checks++;
      if (bist_active) begin failures++; $display("still active after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
