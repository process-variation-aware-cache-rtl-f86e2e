// data_select -- picks one way's line out of the N lines read from the data array.
//
// An AND-OR multiplexer driven by a one-hot way select (the hit vector on a
// hit, the victim way on a write-back). With an all-zero select the output is
// zero, so a miss or a disabled way can never leak stale data to the output.
//
// Purely combinational. The block is the "data select logic" of the published
// organisation; the one-hot AND-OR form is this design's choice.
module data_select #(
  parameter int unsigned N_WAYS = 16,
  parameter int unsigned LINE_W = 512
) (
  input  logic [LINE_W-1:0] rd_line [N_WAYS],
  input  logic [N_WAYS-1:0] sel_onehot,
  output logic [LINE_W-1:0] line
);

  always_comb begin
    line = '0;
    for (int w = 0; w < N_WAYS; w++) begin
      line |= rd_line[w] & {LINE_W{sel_onehot[w]}};
    end
  end

endmodule
