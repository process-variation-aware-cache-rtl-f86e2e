// tb_cache_ctrl -- self-checking test of the cache controller with small arrays.
// The controller is wired to a tag array, data array, decode logic and data
// select of 4 ways x 8 sets of 8-byte lines, and to a next-level memory model.
// Random line reads and write-backs over 64 line addresses (twice the cache
// capacity) are mixed with random resizes. Every read must return the most
// recently written data (a golden copy kept by the testbench), every hit must
// answer exactly HIT_LATENCY cycles after acceptance, no data may be written
// into a disabled way, and after each resize the mask and supply enables must
// equal the requested mask. Hits, misses, victim write-backs, resize
// write-backs, stalled requests, shrinking and growing resizes are counted
// and each must occur.
module tb_cache_ctrl;
  import wp_pkg::*;
  localparam int N = 4, SETS = 8, LINE_BYTES = 8, ADDR_W = 12, HIT_LATENCY = 20;
  localparam int IDX_W = 3, OFF_W = 3, TAG_W = ADDR_W - IDX_W - OFF_W, ENT_W = TAG_W + 2;
  localparam int LINE_W = LINE_BYTES * 8;

  logic clk = 0, rst_n;
  logic req_valid, req_ready, rsp_valid, rsp_hit;
  cache_op_e req_op;
  logic [ADDR_W-1:0] req_addr;
  logic [LINE_W-1:0] req_wline, rsp_rline;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0] mem_req_wline, mem_rsp_rline;
  logic resize_req, resize_ack, resize_busy, resize_done, bist_active;
  logic [N-1:0] resize_mask, way_mask, pwr_en;
  logic [ADDR_W-1:0] lookup_addr;
  logic arr_rd_en, hit;
  logic [IDX_W-1:0] arr_index, req_index;
  logic [TAG_W-1:0] req_tag;
  logic [N-1:0] tag_we_ways, data_we_ways, hit_vec, valid_vec, dirty_vec, dsel_onehot;
  logic [ENT_W-1:0] tag_wr_entry;
  logic [ENT_W-1:0] tag_rd_entry [N];
  logic [LINE_W-1:0] data_wr_line, sel_line;
  logic [LINE_W-1:0] data_rd_line [N];
  logic [1:0] hit_way;
  logic ev_hit, ev_miss, ev_victim_wb, ev_resize_wb, ev_stall;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_vwb = 0, n_rwb = 0, n_stall = 0, n_shrink = 0, n_grow = 0;
  logic [LINE_W-1:0] golden [logic [ADDR_W-1:0]];

  cache_ctrl #(.N_WAYS(N), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W),
               .HIT_LATENCY(HIT_LATENCY)) dut (.*);
  tag_array #(.N_WAYS(N), .SETS(SETS), .TAG_W(TAG_W)) u_tags (
    .clk, .pwr_en, .rd_en(arr_rd_en), .index(arr_index), .we_ways(tag_we_ways),
    .wr_entry(tag_wr_entry), .rd_entry(tag_rd_entry));
  data_array #(.N_WAYS(N), .SETS(SETS), .LINE_W(LINE_W)) u_data (
    .clk, .pwr_en, .rd_en(arr_rd_en), .index(arr_index), .we_ways(data_we_ways),
    .wr_line(data_wr_line), .rd_line(data_rd_line));
  decode_logic #(.N_WAYS(N), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W)) u_dec (
    .addr(lookup_addr), .way_mask, .rd_entry(tag_rd_entry), .index(req_index),
    .tag(req_tag), .hit_vec, .hit, .hit_way, .valid_vec, .dirty_vec);
  data_select #(.N_WAYS(N), .LINE_W(LINE_W)) u_sel (
    .rd_line(data_rd_line), .sel_onehot(dsel_onehot), .line(sel_line));
  tb_mem_model #(.ADDR_W(ADDR_W), .LINE_W(LINE_W), .LAT(5)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wline(mem_req_wline), .rsp_valid(mem_rsp_valid),
    .rsp_rline(mem_rsp_rline));

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_victim_wb) n_vwb++;
    if (ev_resize_wb) n_rwb++;
    if (ev_stall) n_stall++;
    if ((data_we_ways & ~way_mask) != 0) begin
      failures++; $display("data written into disabled way: %b mask %b", data_we_ways, way_mask);
    end
  end

  function automatic logic [LINE_W-1:0] gold(input logic [ADDR_W-1:0] a);
    return golden.exists(a) ? golden[a] : u_mem.init_line(a);
  endfunction

  task automatic access(input cache_op_e op, input logic [ADDR_W-1:0] a);
    int lat;
    logic [LINE_W-1:0] wl;
    wl = {$urandom, $urandom};
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wline = wl;
    while (!req_ready) begin @(negedge clk); end
    @(negedge clk); req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    if (op == OP_WRITE) golden[a] = wl;
    checks++;
    if (op == OP_READ && rsp_rline !== gold(a)) begin
      failures++; $display("read %h got %h exp %h", a, rsp_rline, gold(a));
    end
    if (rsp_hit) begin
      checks++;
      if (lat != HIT_LATENCY) begin failures++; $display("hit latency %0d", lat); end
    end
  endtask

  task automatic resize(input logic [N-1:0] m);
    logic [N-1:0] old;
    old = way_mask;
    @(negedge clk); resize_req = 1; resize_mask = m;
    @(negedge clk); resize_req = 0;
    while (!resize_done) @(negedge clk);
    @(negedge clk);
    if ((old & ~m) != 0) n_shrink++;
    if ((m & ~old) != 0) n_grow++;
    checks++;
    if (way_mask !== m || pwr_en !== m) begin
      failures++; $display("mask %b pwr %b exp %b", way_mask, pwr_en, m);
    end
  endtask

  // a request raised during a resize must wait for it
  task automatic resize_with_pending_request(input logic [N-1:0] m);
    @(negedge clk); resize_req = 1; resize_mask = m;
    @(negedge clk); resize_req = 0;
    fork
      access(OP_READ, {6'($urandom % 8), 3'($urandom), 3'b0});
    join_none
    while (!resize_done) @(negedge clk);
    wait fork;
  endtask

  initial begin
    req_valid = 0; req_op = OP_READ; req_addr = 0; req_wline = 0;
    resize_req = 0; resize_mask = '1; bist_active = 0;
    rst_n = 0; #22 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [ADDR_W-1:0] a;
      a = {6'($urandom % 8), 3'($urandom), 3'b0};
      if (t % 250 == 249) begin
        logic [N-1:0] m;
        do m = N'($urandom); while (m == 0);
        if (t % 500 == 499) resize_with_pending_request(m);
        else resize(m);
      end else begin
        access(($urandom % 10 < 4) ? OP_WRITE : OP_READ, a);
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_vwb == 0 || n_rwb == 0 || n_stall == 0 ||
        n_shrink == 0 || n_grow == 0) begin
      failures++;
    end
    $display("hits %0d misses %0d victim_wb %0d resize_wb %0d stall_cycles %0d shrink %0d grow %0d",
             n_hit, n_miss, n_vwb, n_rwb, n_stall, n_shrink, n_grow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
