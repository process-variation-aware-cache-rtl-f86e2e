// decode_logic -- address decode and tag match restricted to enabled ways.
//
// Splits a physical address into tag, set index and byte offset, and compares
// the request tag with the entry read from every way. A way can hit only if it
// is valid and its bit of the way enable/disable mask is 1, so a disabled
// (supply-gated) way never produces a hit whatever its sub-array returns.
//
// Purely combinational. Outputs: the one-hot hit vector, a hit flag, the
// binary number of the hitting way, and the valid/dirty bits of every way
// (used by the controller to pick and write back victims). The index, tag,
// valid and dirty outputs are plain bit-field extractions of the inputs, kept
// here so the field layout is defined in one place.
// The address split and the masking of disabled ways follow the published
// organisation; the entry layout {valid, dirty, tag} is this design's choice.
module decode_logic #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned SETS   = 16384,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W = 40,
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned ENT_W = TAG_W + 2,
  localparam int unsigned WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic [N_WAYS-1:0] way_mask,
  input  logic [ENT_W-1:0]  rd_entry [N_WAYS],
  output logic [IDX_W-1:0]  index,
  output logic [TAG_W-1:0]  tag,
  output logic [N_WAYS-1:0] hit_vec,
  output logic              hit,
  output logic [WAY_W-1:0]  hit_way,
  output logic [N_WAYS-1:0] valid_vec,
  output logic [N_WAYS-1:0] dirty_vec
);

  assign index = addr[OFF_W +: IDX_W];
  assign tag   = addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    hit_way = '0;
    for (int w = 0; w < N_WAYS; w++) begin
      valid_vec[w] = rd_entry[w][TAG_W+1] & way_mask[w];
      dirty_vec[w] = rd_entry[w][TAG_W];
      hit_vec[w]   = valid_vec[w] && (rd_entry[w][TAG_W-1:0] == tag);
    end
    for (int w = N_WAYS-1; w >= 0; w--) begin
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
  end

  assign hit = |hit_vec;

endmodule
