// hn_barrel_shifter: pipelined rotator (barrel shifter) of N elements.
//
// Rotates the batch to the right by amt_i positions: out_o[q] =
// in_i[(q - amt_i) mod N]. Level j rotates by 2^j when bit j of the amount
// is set (least significant bit first, an arbitrary but fixed choice), using one 2-to-1 multiplexer per element; the amount travels down
// the pipeline alongside the data. Level j is global stage FIRST+j and ends
// in a register or, under register removal (factor S), a wire.
// N must be a power of two. Latency: the number of registered levels
// (log2(N) cycles when S = 1).
module hn_barrel_shifter #(
  parameter int unsigned N     = 16,
  parameter int unsigned EW    = 8,
  parameter int unsigned S     = 2,
  parameter int unsigned LG    = $clog2(N),
  parameter int unsigned FIRST = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][EW-1:0] in_i,
  input  logic [LG-1:0]        amt_i,
  output logic [N-1:0][EW-1:0] out_o
);
  localparam int unsigned NL = $clog2(N);

  logic [N-1:0][EW-1:0] dat [NL+1];
  logic [LG-1:0]        amt [NL+1];

  assign dat[0] = in_i;
  assign amt[0] = amt_i;

  for (genvar j = 0; j < NL; j++) begin : g_lvl
    logic [N-1:0][EW-1:0] nx;
    for (genvar q = 0; q < N; q++) begin : g_mux
      assign nx[q] = amt[j][j] ? dat[j][(q + N - (1 << j)) % N] : dat[j][q];
    end
    hn_stage_reg #(.W(N*EW + LG), .REG(hn_pkg::stage_reg(FIRST + j, LG, S))) u_reg (
      .clk(clk), .rst(rst), .d({nx, amt[j]}), .q({dat[j+1], amt[j+1]})
    );
  end

  assign out_o = dat[NL];
endmodule
