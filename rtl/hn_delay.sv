// hn_delay: synchronising shift register of the switch pipeline.
//
// Delays a W-bit value through N pipeline stages, global stages FIRST to
// FIRST+N-1. Under register removal (factor S, see hn_pkg::stage_reg) the
// stages that lose their registers become wires, so a shift register of
// length 4 with S = 2 holds two registers. N = 0 is a plain wire.
// Latency: the number of registered stages among the N.
module hn_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned N     = 2,
  parameter int unsigned S     = 1,
  parameter int unsigned LG    = 4,
  parameter int unsigned FIRST = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] st [N+1];
  assign st[0] = d;

  for (genvar i = 0; i < N; i++) begin : g_st
    hn_stage_reg #(.W(W), .REG(hn_pkg::stage_reg(FIRST + i, LG, S))) u_reg (
      .clk(clk), .rst(rst), .d(st[i]), .q(st[i+1])
    );
  end

  assign q = st[N];
endmodule
