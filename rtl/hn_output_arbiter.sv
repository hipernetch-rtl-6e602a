// hn_output_arbiter: serialises one port's FIFO group onto its output.
//
// Sends at most one packet per cycle. Two policies, chosen by SIMPLE:
//   SIMPLE = 1  the simpler arbiter suited to this switch: because the
//               queues of a group are written in round-robin order, only the
//               queue at the arbiter's index needs checking; if it holds a
//               packet it is sent and the index advances (mod P), otherwise
//               the arbiter waits. Dropped packets can leave it out of step
//               with the writers, so packets may wait until that queue fills.
//   SIMPLE = 0  a regular round-robin arbiter: the first non-empty queue at
//               or after the index is served and the index moves past it.
// out_valid_o/out_data_o are combinational from the queue heads; rd_o pops
// the served queue at the next edge. The index resets to queue 0.
module hn_output_arbiter #(
  parameter int unsigned P      = 16,
  parameter int unsigned W      = 512,
  parameter bit          SIMPLE = 1'b1,
  parameter int unsigned LG     = $clog2(P)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [P-1:0]        nempty_i,
  input  logic [P-1:0][W-1:0] head_i,
  output logic [P-1:0]        rd_o,
  output logic                out_valid_o,
  output logic [W-1:0]        out_data_o
);
  logic [LG-1:0] idx, sel;
  logic          found;

  always_comb begin
    found = 1'b0;
    sel   = idx;
    if (SIMPLE) begin
      found = nempty_i[idx];
    end else begin
      for (int i = P - 1; i >= 0; i--)
        if (nempty_i[LG'(idx + LG'(i))]) begin
          found = 1'b1;
          sel   = LG'(idx + LG'(i));
        end
    end
    rd_o        = '0;
    rd_o[sel]   = found;
    out_valid_o = found;
    out_data_o  = head_i[sel];
  end

  always_ff @(posedge clk) begin
    if (rst)        idx <= '0;
    else if (found) idx <= LG'(sel + 1'b1);
  end
endmodule
