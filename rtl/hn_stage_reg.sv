// hn_stage_reg: one pipeline stage boundary of the switch.
//
// With REG = 1 the stage value is captured by a register with synchronous,
// active-high reset to zero (zero is an invalid packet / a zero count). With
// REG = 0 the stage boundary is a plain wire: this is how the register
// removal of the latency-reduction factor S is realised, keeping the notion
// of stages while dropping their flip-flops.
module hn_stage_reg #(
  parameter int unsigned W   = 8,
  parameter bit          REG = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (REG) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) q <= '0;
      else     q <= d;
    end
  end else begin : g_wire
    assign q = d;
  end
endmodule
