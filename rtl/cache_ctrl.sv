// cache_ctrl -- controller of the way-prioritized L3: lookups, misses and resizing.
//
// The controller owns the way enable/disable mask and the supply enables of
// the way sub-arrays, and runs three kinds of work:
//
//  * Requests from the level above (line reads and line write-backs). The set
//    is read from every way, the decode logic matches tags in enabled ways
//    only, and a hit is answered exactly HIT_LATENCY cycles after the request
//    was accepted. On a miss a victim is chosen among the enabled ways (the
//    first invalid one, otherwise the next enabled way after a rotating
//    pointer); a dirty victim is first written to the next level; a read miss
//    then fetches the line, a write miss allocates the written line directly.
//    The cache is write-back and write-allocate.
//  * Resizing to a new mask. Newly enabled ways are powered first. Every set
//    is then visited: dirty lines in ways being disabled are written back to
//    the next level, and the entries of ways being disabled or enabled are
//    invalidated. Only then is the mask switched and the supply of the
//    disabled ways gated. Requests are stalled (req_ready low) meanwhile.
//  * Invalidation of all sets after reset and after a leakage self-test,
//    because a sub-array that was unpowered holds garbage.
//
// Interface and timing: req_valid/req_ready handshake, rsp_valid for one cycle
// with rsp_rline (reads) and rsp_hit; a request is accepted only in the idle
// state, one at a time. mem_req_valid/mem_req_ready towards the next level,
// mem_rsp_valid carries a fetched line. resize_req with resize_mask is taken
// in the idle state, which resize_ack marks (resize_busy then stays high until
// resize_done pulses). bist_active
// holds the controller idle. ev_* are one-cycle event strobes for counters.
// Writing back dirty data before gating a disabled way and using ways as the
// gating unit follow the published scheme; the replacement rule, the
// write-allocate policy, the set-by-set sweep and the handshakes are this
// design's choices.
module cache_ctrl
  import wp_pkg::*;
#(
  parameter int unsigned N_WAYS      = 16,
  parameter int unsigned SETS        = 16384,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned ADDR_W      = 40,
  parameter int unsigned HIT_LATENCY = 20,
  localparam int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned ENT_W  = TAG_W + 2,
  localparam int unsigned LINE_W = LINE_BYTES * 8,
  localparam int unsigned WAY_W  = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // level above
  input  logic              req_valid,
  output logic              req_ready,
  input  cache_op_e         req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0] req_wline,
  output logic              rsp_valid,
  output logic [LINE_W-1:0] rsp_rline,
  output logic              rsp_hit,
  // next level of the memory hierarchy
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [LINE_W-1:0] mem_req_wline,
  input  logic              mem_rsp_valid,
  input  logic [LINE_W-1:0] mem_rsp_rline,
  // resizing
  input  logic              resize_req,
  input  logic [N_WAYS-1:0] resize_mask,
  output logic              resize_ack,
  output logic              resize_busy,
  output logic              resize_done,
  output logic [N_WAYS-1:0] way_mask,
  output logic [N_WAYS-1:0] pwr_en,
  input  logic              bist_active,
  // arrays and decode logic
  output logic [ADDR_W-1:0] lookup_addr,
  output logic              arr_rd_en,
  output logic [IDX_W-1:0]  arr_index,
  output logic [N_WAYS-1:0] tag_we_ways,
  output logic [ENT_W-1:0]  tag_wr_entry,
  input  logic [ENT_W-1:0]  tag_rd_entry [N_WAYS],
  output logic [N_WAYS-1:0] data_we_ways,
  output logic [LINE_W-1:0] data_wr_line,
  input  logic [IDX_W-1:0]  req_index,
  input  logic [TAG_W-1:0]  req_tag,
  input  logic [N_WAYS-1:0] hit_vec,
  input  logic              hit,
  input  logic [N_WAYS-1:0] valid_vec,
  input  logic [N_WAYS-1:0] dirty_vec,
  output logic [N_WAYS-1:0] dsel_onehot,
  input  logic [LINE_W-1:0] sel_line,
  // event strobes
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_victim_wb,
  output logic              ev_resize_wb,
  output logic              ev_stall
);

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_BIST, S_READ, S_LOOKUP, S_HIT_WAIT, S_WB, S_FETCH,
    S_FETCH_WAIT, S_FILL, S_RESP, S_RZ_READ, S_RZ_CHECK, S_RZ_WB, S_RZ_INV,
    S_RZ_DONE
  } state_e;

  localparam int unsigned CNT_W = $clog2(HIT_LATENCY + 1) + 1;

  state_e            state_q;
  cache_op_e         op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [LINE_W-1:0] wline_q;
  logic [LINE_W-1:0] line_q;       // response line / victim line buffer
  logic [CNT_W-1:0]  cnt_q;        // cycles since the request was accepted
  logic              hit_q;
  logic [N_WAYS-1:0] victim_q;     // one-hot victim way
  logic [TAG_W-1:0]  victim_tag_q;
  logic [WAY_W-1:0]  rr_q;         // rotating replacement pointer
  logic [IDX_W-1:0]  sweep_q;      // set visited by a sweep
  logic [N_WAYS-1:0] mask_q, new_mask_q, pwr_q, wb_pend_q;

  logic [N_WAYS-1:0] victim_c, wb_first;
  logic [N_WAYS-1:0] off_ways, chg_ways;

  // Victim choice among enabled ways: first invalid way, else round robin.
  always_comb begin
    logic found;
    logic [WAY_W-1:0] w;
    victim_c = '0;
    found    = 1'b0;
    for (int i = 0; i < N_WAYS; i++) begin
      if (!found && mask_q[i] && !valid_vec[i]) begin
        victim_c[i] = 1'b1;
        found       = 1'b1;
      end
    end
    for (int i = 0; i < N_WAYS; i++) begin
      w = WAY_W'((int'(rr_q) + i) % N_WAYS);
      if (!found && mask_q[w]) begin
        victim_c[w] = 1'b1;
        found       = 1'b1;
      end
    end
  end

  // Lowest pending resize write-back.
  always_comb begin
    wb_first = '0;
    for (int i = N_WAYS-1; i >= 0; i--) begin
      if (wb_pend_q[i]) wb_first = N_WAYS'(1) << i;
    end
  end

  assign off_ways = mask_q & ~new_mask_q;
  assign chg_ways = mask_q ^ new_mask_q;

  function automatic logic [WAY_W-1:0] onehot_to_idx(input logic [N_WAYS-1:0] oh);
    onehot_to_idx = '0;
    for (int i = 0; i < N_WAYS; i++) if (oh[i]) onehot_to_idx = WAY_W'(i);
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input logic [ENT_W-1:0] e [N_WAYS],
                                               input logic [N_WAYS-1:0] oh);
    tag_of = '0;
    for (int i = 0; i < N_WAYS; i++) if (oh[i]) tag_of = e[i][TAG_W-1:0];
  endfunction

  // Outputs driven from the state.
  assign lookup_addr = addr_q;
  assign way_mask    = mask_q;
  assign pwr_en      = pwr_q;
  assign req_ready   = (state_q == S_IDLE) && !resize_req && !bist_active;
  assign rsp_valid   = (state_q == S_RESP);
  assign rsp_rline   = line_q;
  assign rsp_hit     = hit_q;
  assign resize_ack  = (state_q == S_IDLE) && resize_req && !bist_active;
  assign resize_busy = (state_q inside {S_RZ_READ, S_RZ_CHECK, S_RZ_WB, S_RZ_INV, S_RZ_DONE});
  assign ev_stall    = req_valid && resize_busy;

  always_comb begin
    arr_rd_en     = (state_q == S_READ) || (state_q == S_RZ_READ);
    arr_index     = (state_q inside {S_INIT, S_RZ_READ, S_RZ_CHECK, S_RZ_WB, S_RZ_INV})
                    ? sweep_q : req_index;
    tag_we_ways   = '0;
    tag_wr_entry  = '0;
    data_we_ways  = '0;
    data_wr_line  = wline_q;
    dsel_onehot   = victim_q;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {req_tag, req_index, OFF_W'(0)};
    mem_req_wline = line_q;
    unique case (state_q)
      S_INIT: tag_we_ways = pwr_q;
      S_LOOKUP: begin
        dsel_onehot = hit ? hit_vec : victim_c;
        if (hit && op_q == OP_WRITE) begin
          tag_we_ways  = hit_vec;
          tag_wr_entry = {1'b1, 1'b1, req_tag};
          data_we_ways = hit_vec;
        end
      end
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {victim_tag_q, req_index, OFF_W'(0)};
      end
      S_FETCH: mem_req_valid = 1'b1;
      S_FILL: begin
        tag_we_ways  = victim_q;
        tag_wr_entry = {1'b1, (op_q == OP_WRITE), req_tag};
        data_we_ways = victim_q;
        data_wr_line = (op_q == OP_WRITE) ? wline_q : line_q;
      end
      S_RZ_WB: begin
        dsel_onehot   = wb_first;
        mem_req_valid = (wb_pend_q != '0);
        mem_req_we    = 1'b1;
        mem_req_addr  = {tag_of(tag_rd_entry, wb_first), sweep_q, OFF_W'(0)};
        mem_req_wline = sel_line;
      end
      S_RZ_INV: tag_we_ways = chg_ways;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_INIT;
      op_q         <= OP_READ;
      addr_q       <= '0;
      wline_q      <= '0;
      line_q       <= '0;
      cnt_q        <= '0;
      hit_q        <= 1'b0;
      victim_q     <= '0;
      victim_tag_q <= '0;
      rr_q         <= '0;
      sweep_q      <= '0;
      mask_q       <= '1;
      new_mask_q   <= '1;
      pwr_q        <= '1;
      wb_pend_q    <= '0;
      resize_done  <= 1'b0;
      ev_hit       <= 1'b0;
      ev_miss      <= 1'b0;
      ev_victim_wb <= 1'b0;
      ev_resize_wb <= 1'b0;
    end else begin
      resize_done  <= 1'b0;
      ev_hit       <= 1'b0;
      ev_miss      <= 1'b0;
      ev_victim_wb <= 1'b0;
      ev_resize_wb <= 1'b0;
      if (cnt_q != '1) cnt_q <= cnt_q + 1'b1;
      unique case (state_q)
        S_INIT: begin
          sweep_q <= sweep_q + 1'b1;
          if (int'(sweep_q) == SETS - 1) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (bist_active) begin
            state_q <= S_BIST;
          end else if (resize_req) begin
            new_mask_q <= resize_mask;
            pwr_q      <= mask_q | resize_mask;
            sweep_q    <= '0;
            state_q    <= S_RZ_READ;
          end else if (req_valid) begin
            op_q    <= req_op;
            addr_q  <= req_addr;
            wline_q <= req_wline;
            cnt_q   <= CNT_W'(1);
            state_q <= S_READ;
          end
        end
        S_BIST: if (!bist_active) begin
          sweep_q <= '0;
          state_q <= S_INIT;
        end
        S_READ: state_q <= S_LOOKUP;
        S_LOOKUP: begin
          hit_q  <= hit;
          line_q <= sel_line;
          if (hit) begin
            ev_hit  <= 1'b1;
            state_q <= S_HIT_WAIT;
          end else begin
            ev_miss      <= 1'b1;
            victim_q     <= victim_c;
            victim_tag_q <= tag_of(tag_rd_entry, victim_c);
            rr_q         <= onehot_to_idx(victim_c) + 1'b1;
            if (|(victim_c & valid_vec & dirty_vec)) state_q <= S_WB;
            else if (op_q == OP_READ)               state_q <= S_FETCH;
            else                                    state_q <= S_FILL;
          end
        end
        S_HIT_WAIT: if (cnt_q >= CNT_W'(HIT_LATENCY - 1)) state_q <= S_RESP;
        S_WB: if (mem_req_ready) begin
          ev_victim_wb <= 1'b1;
          state_q      <= (op_q == OP_READ) ? S_FETCH : S_FILL;
        end
        S_FETCH: if (mem_req_ready) state_q <= S_FETCH_WAIT;
        S_FETCH_WAIT: if (mem_rsp_valid) begin
          line_q  <= mem_rsp_rline;
          state_q <= S_FILL;
        end
        S_FILL: state_q <= S_RESP;
        S_RESP: state_q <= S_IDLE;
        S_RZ_READ: begin
          if (chg_ways == '0) state_q <= S_RZ_DONE;
          else                state_q <= S_RZ_CHECK;
        end
        S_RZ_CHECK: begin
          wb_pend_q <= off_ways & valid_vec & dirty_vec;
          state_q   <= S_RZ_WB;
        end
        S_RZ_WB: begin
          if (wb_pend_q == '0) state_q <= S_RZ_INV;
          else if (mem_req_ready) begin
            wb_pend_q    <= wb_pend_q & ~wb_first;
            ev_resize_wb <= 1'b1;
          end
        end
        S_RZ_INV: begin
          sweep_q <= sweep_q + 1'b1;
          if (int'(sweep_q) == SETS - 1) state_q <= S_RZ_DONE;
          else                           state_q <= S_RZ_READ;
        end
        S_RZ_DONE: begin
          mask_q      <= new_mask_q;
          pwr_q       <= new_mask_q;
          resize_done <= 1'b1;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A resize must leave at least one way enabled.
  a_resize_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_IDLE && resize_req && !bist_active) |-> (resize_mask != '0));
  // A hit is answered exactly HIT_LATENCY cycles after acceptance.
  a_hit_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (rsp_valid && rsp_hit) |-> (cnt_q == CNT_W'(HIT_LATENCY)));

  initial begin
    if (HIT_LATENCY < 4) $error("cache_ctrl: HIT_LATENCY must be at least 4");
  end

endmodule
