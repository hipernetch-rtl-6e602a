// hn_adder_tree: pipelined adder tree.
//
// Sums N inputs of IW bits into an OW-bit result in ceil(log2(N)) levels of
// independent two-input adders; level j is global pipeline stage FIRST+j and
// ends in a register or, under register removal (factor S, see
// hn_pkg::stage_reg), a wire. In the switch it is used as a popcount over the
// P packets of a batch (IW = 1): one tree counts the invalid slots and one
// tree per output port counts the packets for that port.
// Latency: the number of registered levels (log2(N) cycles when S = 1).
module hn_adder_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned IW    = 1,
  parameter int unsigned OW    = 5,
  parameter int unsigned S     = 2,
  parameter int unsigned LG    = 4,
  parameter int unsigned FIRST = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][IW-1:0] in_i,
  output logic [OW-1:0]        sum_o
);
  localparam int unsigned NL = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << NL;   // inputs padded to a power of two

  logic [NP-1:0][OW-1:0] lv [NL+1];

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i < N) begin : g_used
      assign lv[0][i] = OW'(in_i[i]);
    end else begin : g_pad
      assign lv[0][i] = '0;
    end
  end

  for (genvar j = 0; j < NL; j++) begin : g_lvl
    logic [NP-1:0][OW-1:0] nx;
    for (genvar i = 0; i < NP; i++) begin : g_add
      if (i < (NP >> (j + 1))) begin : g_sum
        assign nx[i] = lv[j][2*i] + lv[j][2*i+1];
      end else begin : g_zero
        assign nx[i] = '0;
      end
    end
    hn_stage_reg #(.W(NP*OW), .REG(hn_pkg::stage_reg(FIRST + j, LG, S))) u_reg (
      .clk(clk), .rst(rst), .d(nx), .q(lv[j+1])
    );
  end

  assign sum_o = lv[NL][0];
endmodule
