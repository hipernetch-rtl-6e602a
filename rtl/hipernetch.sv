// hipernetch: P x P packet switch built on the combined parallel round-robin
// arbiter.
//
// Every cycle each input port may present one packet (valid, destination
// port, W-bit payload). The combined arbiter (hn_cprr_arbiter) sorts and
// rotates each batch so that the packets for port k are spread over the P
// queues of port k's FIFO group in round-robin order; an output arbiter per
// port then drains its group one packet per cycle. There is no crossbar, no
// iterative matching and no speedup: one clock runs everything, and the
// only place a packet can be lost is a full queue (counted on drop_cnt_o).
//
// Parameters (defaults: the 16-port, 512-bit, S = 2 configuration):
//   P      ports, a power of two       W      payload bits per packet
//   S      latency-reduction factor: only every S-th pipeline stage, counted
//          from the offset-counter stage, keeps its registers
//   DEPTH  packets per queue (P*DEPTH per output port)
//   SIMPLE_ARB  1: index-only output arbiter, 0: regular round-robin
// Timing: a packet entering at cycle t leaves at the earliest at cycle
// t + LATENCY + 1, LATENCY = hn_pkg::latency_opt(log2 P, S) (7 for the
// defaults, so 8 cycles port to port).
module hipernetch #(
  parameter int unsigned P          = 16,
  parameter int unsigned W          = 512,
  parameter int unsigned S          = 2,
  parameter int unsigned DEPTH      = 1,
  parameter bit          SIMPLE_ARB = 1'b1,
  parameter int unsigned LG         = $clog2(P)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [P-1:0]              in_valid_i,
  input  logic [P-1:0][LG-1:0]      in_dest_i,
  input  logic [P-1:0][W-1:0]       in_data_i,
  output logic [P-1:0]              out_valid_o,
  output logic [P-1:0][W-1:0]       out_data_o,
  output logic [P-1:0][LG:0]        drop_cnt_o
);
  logic [P-1:0][P-1:0]        wr_en;
  logic [P-1:0][P-1:0][W-1:0] wr_data;

  hn_cprr_arbiter #(.P(P), .W(W), .S(S), .LG(LG)) u_arb (
    .clk(clk), .rst(rst),
    .in_valid_i(in_valid_i), .in_dest_i(in_dest_i), .in_data_i(in_data_i),
    .wr_en_o(wr_en), .wr_data_o(wr_data)
  );

  for (genvar k = 0; k < P; k++) begin : g_port
    logic [P-1:0]        nempty, rd;
    logic [P-1:0][W-1:0] head;

    hn_fifo_group #(.P(P), .W(W), .DEPTH(DEPTH), .CW(LG + 1)) u_fifos (
      .clk(clk), .rst(rst),
      .wr_en_i(wr_en[k]), .wr_data_i(wr_data[k]),
      .rd_i(rd), .nempty_o(nempty), .head_o(head), .drop_o(drop_cnt_o[k])
    );

    hn_output_arbiter #(.P(P), .W(W), .SIMPLE(SIMPLE_ARB), .LG(LG)) u_oarb (
      .clk(clk), .rst(rst),
      .nempty_i(nempty), .head_i(head), .rd_o(rd),
      .out_valid_o(out_valid_o[k]), .out_data_o(out_data_o[k])
    );
  end
endmodule
