// tb_mem_model -- behavioural model of the next level of the memory hierarchy.
// Used only by testbenches. Accepts line reads and writes with a randomly
// delayed ready, answers reads LAT cycles after acceptance, and keeps every
// written line. A line never written reads as init_line(address), a pattern
// derived from the address so that testbenches can predict it.
module tb_mem_model #(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned LINE_W = 512,
  parameter int unsigned LAT    = 6
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0] req_wline,
  output logic              rsp_valid,
  output logic [LINE_W-1:0] rsp_rline
);
  logic [LINE_W-1:0] store [logic [ADDR_W-1:0]];
  int unsigned n_reads = 0, n_writes = 0;
  int          pending = -1;
  logic [ADDR_W-1:0] pend_addr;

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W; i += 32) l[i +: 32] = 32'(a) * 32'h9e3779b1 + 32'(i) * 32'h85ebca6b;
    return l;
  endfunction

  function automatic logic [LINE_W-1:0] peek(input logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  initial begin req_ready = 0; rsp_valid = 0; rsp_rline = '0; end

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (pending > 0) pending <= pending - 1;
    if (pending == 0) begin
      rsp_valid <= 1'b1;
      rsp_rline <= peek(pend_addr);
      pending   <= -1;
    end
    if (req_valid && req_ready) begin
      if (req_we) begin
        store[req_addr] = req_wline;
        n_writes++;
      end else begin
        pend_addr <= req_addr;
        pending   <= LAT - 1;
        n_reads++;
      end
    end
    req_ready <= ($urandom % 3 != 0) && pending < 0;
  end
endmodule
