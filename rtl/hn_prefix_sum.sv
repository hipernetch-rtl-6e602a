// hn_prefix_sum: pipelined parallel (Kogge-Stone) inclusive prefix sum.
//
// out_o[k] = in_i[0] + ... + in_i[k] for k = 0..N-1, computed in log2(N)
// levels; at level j every element adds the partial sum 2^j positions to its
// left (the Kogge-Stone form is this implementation's choice; any
// log2(N)-level parallel prefix network would do). Level j is global pipeline stage FIRST+j and ends in a register or,
// under register removal (factor S, see hn_pkg::stage_reg), a wire.
// In the switch the inputs are {invalid count, count for port 0, ...,
// count for port P-2}, so out_o[k] is the position in the sorted batch at
// which the packets for port k start.
// Latency: the number of registered levels (log2(N) cycles when S = 1).
module hn_prefix_sum #(
  parameter int unsigned N     = 16,
  parameter int unsigned W     = 5,
  parameter int unsigned S     = 2,
  parameter int unsigned LG    = 4,
  parameter int unsigned FIRST = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] in_i,
  output logic [N-1:0][W-1:0] out_o
);
  localparam int unsigned NL = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][W-1:0] lv [NL+1];
  assign lv[0] = in_i;

  for (genvar j = 0; j < NL; j++) begin : g_lvl
    logic [N-1:0][W-1:0] nx;
    for (genvar i = 0; i < N; i++) begin : g_el
      if (i >= (1 << j)) begin : g_add
        assign nx[i] = lv[j][i] + lv[j][i-(1<<j)];
      end else begin : g_keep
        assign nx[i] = lv[j][i];
      end
    end
    hn_stage_reg #(.W(N*W), .REG(hn_pkg::stage_reg(FIRST + j, LG, S))) u_reg (
      .clk(clk), .rst(rst), .d(nx), .q(lv[j+1])
    );
  end

  assign out_o = lv[NL];
endmodule
