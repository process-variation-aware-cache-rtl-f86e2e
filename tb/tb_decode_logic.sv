// tb_decode_logic -- self-checking test of address split and masked tag match.
// Random addresses, stored entries and way masks; expected hit vector, way
// number and valid/dirty bits are computed independently in the testbench.
module tb_decode_logic;
  localparam int N = 8, SETS = 16, LINE_BYTES = 4, ADDR_W = 14;
  localparam int IDX_W = 4, OFF_W = 2, TAG_W = ADDR_W - IDX_W - OFF_W, ENT_W = TAG_W + 2;
  logic [ADDR_W-1:0] addr;
  logic [N-1:0] way_mask, hit_vec, valid_vec, dirty_vec;
  logic [ENT_W-1:0] rd_entry [N];
  logic [IDX_W-1:0] index;
  logic [TAG_W-1:0] tag;
  logic hit;
  logic [2:0] hit_way;
  int checks = 0, failures = 0;

  decode_logic #(.N_WAYS(N), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] ev, ehit;
      int ew;
      addr = ADDR_W'($urandom);
      way_mask = N'($urandom);
      for (int w = 0; w < N; w++) begin
        rd_entry[w] = ENT_W'($urandom);
        if ($urandom % 3 == 0) rd_entry[w][TAG_W-1:0] = addr[ADDR_W-1:ADDR_W-TAG_W];
      end
      // at most one valid matching way in a real cache: keep only the first
      ew = -1;
      for (int w = 0; w < N; w++) begin
        if (rd_entry[w][TAG_W-1:0] == addr[13:6] && rd_entry[w][TAG_W+1] && way_mask[w]) begin
          if (ew >= 0) rd_entry[w][TAG_W-1:0] = ~addr[13:6];
          else ew = w;
        end
      end
      #1;
      ev = 0; ehit = 0;
      for (int w = 0; w < N; w++) begin
        ev[w] = rd_entry[w][TAG_W+1] & way_mask[w];
        ehit[w] = (w == ew);
      end
      checks++;
      if (index !== addr[5:2] || tag !== addr[13:6]) begin failures++; $display("split wrong"); end
      checks++;
      if (hit_vec !== ehit || hit !== (ew >= 0)) begin
        failures++; $display("hit_vec %b exp %b", hit_vec, ehit);
      end
      checks++;
      if (ew >= 0 && hit_way !== 3'(ew)) begin failures++; $display("hit_way %0d exp %0d", hit_way, ew); end
      checks++;
      if (valid_vec !== ev) begin failures++; $display("valid %b exp %b", valid_vec, ev); end
      checks++;
      for (int w = 0; w < N; w++) if (dirty_vec[w] !== rd_entry[w][TAG_W]) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
