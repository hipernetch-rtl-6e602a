// hn_subtractors: rotation amounts for the P rotators (one pipeline stage).
//
// Port k's packets sit in the sorted batch from position start_i[k] on and
// must land in queues base_i[k], base_i[k]+1, ... of its FIFO group. One
// rotation to the right by (base - start) mod P does both the left rotation
// that brings the group to position 0 and the right rotation by the queue
// offset. The stage is global stage STAGE and ends in a register or, under
// register removal (factor S), a wire.
module hn_subtractors #(
  parameter int unsigned P     = 16,
  parameter int unsigned LG    = $clog2(P),
  parameter int unsigned CW    = LG + 1,
  parameter int unsigned S     = 2,
  parameter int unsigned STAGE = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [P-1:0][LG-1:0] base_i,
  input  logic [P-1:0][CW-1:0] start_i,
  output logic [P-1:0][LG-1:0] rot_o
);
  logic [P-1:0][LG-1:0] nx;

  always_comb begin
    for (int k = 0; k < P; k++)
      nx[k] = LG'(base_i[k] - start_i[k][LG-1:0]);
  end

  hn_stage_reg #(.W(P*LG), .REG(hn_pkg::stage_reg(STAGE, LG, S))) u_reg (
    .clk(clk), .rst(rst), .d(nx), .q(rot_o)
  );
endmodule
