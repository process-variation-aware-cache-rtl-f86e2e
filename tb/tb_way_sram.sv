// tb_way_sram -- self-checking test of one supply-gated way sub-array.
// Writes random words, reads them back with the one-cycle read latency, and
// checks that a gated array ignores writes and reads back zero.
module tb_way_sram;
  localparam int DEPTH = 32, WIDTH = 12;
  logic clk = 0, pwr_en, en, we;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  way_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk); en = 1; we = 1; addr = a[$clog2(DEPTH)-1:0]; wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd_check(input int a, input logic [WIDTH-1:0] exp);
    @(negedge clk); en = 1; we = 0; addr = a[$clog2(DEPTH)-1:0];
    @(posedge clk); #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("read %0d got %h exp %h", a, rdata, exp); end
    @(negedge clk); en = 0;
    checks++;  // output holds while en is low
    @(posedge clk); #1;
    if (rdata !== exp) begin failures++; $display("hold %0d got %h exp %h", a, rdata, exp); end
  endtask

  initial begin
    pwr_en = 1; en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WIDTH'($urandom);
      wr(i, model[i]);
    end
    for (int i = DEPTH-1; i >= 0; i--) rd_check(i, model[i]);
    // gated: writes ignored, reads zero
    @(negedge clk); pwr_en = 0;
    wr(3, ~model[3]);
    rd_check(3, '0);
    @(negedge clk); pwr_en = 1;
    rd_check(3, model[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
