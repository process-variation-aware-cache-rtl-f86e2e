// tb_data_array -- self-checking test of the per-way line store.
// Fills every way and set with random lines, reads sets back, and checks
// that gated ways return zero and ignore writes.
module tb_data_array;
  localparam int N = 4, SETS = 8, LINE_W = 64;
  logic clk = 0, rd_en;
  logic [N-1:0] pwr_en, we_ways;
  logic [$clog2(SETS)-1:0] index;
  logic [LINE_W-1:0] wr_line;
  logic [LINE_W-1:0] rd_line [N];
  logic [LINE_W-1:0] model [N][SETS];
  int checks = 0, failures = 0;

  data_array #(.N_WAYS(N), .SETS(SETS), .LINE_W(LINE_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic read_set(input int s);
    @(negedge clk); rd_en = 1; we_ways = 0; index = s[$clog2(SETS)-1:0];
    @(posedge clk); #1;
    for (int w = 0; w < N; w++) begin
      logic [LINE_W-1:0] exp;
      exp = pwr_en[w] ? model[w][s] : '0;
      checks++;
      if (rd_line[w] !== exp) begin
        failures++; $display("set %0d way %0d got %h exp %h", s, w, rd_line[w], exp);
      end
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    pwr_en = '1; rd_en = 0; we_ways = 0; index = 0; wr_line = 0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N; w++) begin
        @(negedge clk); we_ways = N'(1) << w; index = s[$clog2(SETS)-1:0];
        wr_line = {$urandom, $urandom}; model[w][s] = wr_line;
      end
    @(negedge clk); we_ways = 0;
    for (int s = 0; s < SETS; s++) read_set(s);
    // gated way 0 ignores a write; on re-power the old word is still there
    pwr_en = 4'b1110;
    @(negedge clk); we_ways = 4'b0001; index = 1; wr_line = '1;
    @(negedge clk); we_ways = 0;
    read_set(1);
    pwr_en = 4'b1111;
    read_set(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
