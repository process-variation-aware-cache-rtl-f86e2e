// tb_tag_array -- self-checking test of the per-way tag store.
// Writes entries into single and multiple ways, reads whole sets back and
// compares with a model; checks that a gated way reads zero.
module tb_tag_array;
  localparam int N = 4, SETS = 8, TAG_W = 6, ENT_W = TAG_W + 2;
  logic clk = 0, rd_en;
  logic [N-1:0] pwr_en, we_ways;
  logic [$clog2(SETS)-1:0] index;
  logic [ENT_W-1:0] wr_entry;
  logic [ENT_W-1:0] rd_entry [N];
  logic [ENT_W-1:0] model [N][SETS];
  int checks = 0, failures = 0;

  tag_array #(.N_WAYS(N), .SETS(SETS), .TAG_W(TAG_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic read_set(input int s);
    @(negedge clk); rd_en = 1; we_ways = 0; index = s[$clog2(SETS)-1:0];
    @(posedge clk); #1;
    for (int w = 0; w < N; w++) begin
      logic [ENT_W-1:0] exp;
      exp = pwr_en[w] ? model[w][s] : '0;
      checks++;
      if (rd_entry[w] !== exp) begin
        failures++; $display("set %0d way %0d got %h exp %h", s, w, rd_entry[w], exp);
      end
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    pwr_en = '1; rd_en = 0; we_ways = 0; index = 0; wr_entry = 0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N; w++) begin
        @(negedge clk); we_ways = N'(1) << w; index = s[$clog2(SETS)-1:0];
        wr_entry = ENT_W'($urandom); model[w][s] = wr_entry;
      end
    @(negedge clk); we_ways = 0;
    for (int s = 0; s < SETS; s++) read_set(s);
    // multi-way write
    @(negedge clk); we_ways = 4'b1010; index = 5; wr_entry = 8'h3c;
    model[1][5] = 8'h3c; model[3][5] = 8'h3c;
    @(negedge clk); we_ways = 0;
    read_set(5);
    // gate way 2
    pwr_en = 4'b1011;
    read_set(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
