// hn_filter: output filter of one rotator (combinational).
//
// Every rotator sees the whole batch, so its output still holds packets for
// other ports. For each of the N positions the filter raises keep_o when the
// packet there is valid and its destination equals PORT, and passes on only
// the payload. An element is {valid, dest[DW-1:0], data[W-1:0]}. The check is
// at most log2(P) bits wide and gets no pipeline stage of its own.
module hn_filter #(
  parameter int unsigned N    = 16,
  parameter int unsigned DW   = 4,
  parameter int unsigned W    = 512,
  parameter int unsigned PORT = 0
) (
  input  logic [N-1:0][DW+W:0] in_i,
  output logic [N-1:0]         keep_o,
  output logic [N-1:0][W-1:0]  data_o
);
  always_comb begin
    for (int q = 0; q < N; q++) begin
      keep_o[q] = in_i[q][DW+W] && (in_i[q][W +: DW] == DW'(PORT));
      data_o[q] = in_i[q][W-1:0];
    end
  end
endmodule
