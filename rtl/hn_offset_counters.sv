// hn_offset_counters: the per-port queue write offsets (compulsory stage).
//
// For every output port k a counter holds the index of the queue, within
// that port's FIFO group, that the next packet for port k will be written
// to. Each cycle the counter advances by the number of packets for port k in
// the batch, modulo P, so the P queues of a group fill in round-robin order.
// base_o[k] is the counter value before this batch's packets, registered:
// this is the only stage with feedback, so its register is never removed by
// the latency-reduction factor. Counters reset to 0 (a choice of
// this implementation, matching the output arbiters that start at queue 0).
// Timing: cnt_i of a batch in cycle t gives base_o in cycle t+1.
module hn_offset_counters #(
  parameter int unsigned P  = 16,
  parameter int unsigned LG = $clog2(P),
  parameter int unsigned CW = LG + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [P-1:0][CW-1:0] cnt_i,
  output logic [P-1:0][LG-1:0] base_o
);
  logic [P-1:0][LG-1:0] ofs;

  always_ff @(posedge clk) begin
    if (rst) begin
      ofs    <= '0;
      base_o <= '0;
    end else begin
      for (int k = 0; k < P; k++) begin
        // P is a power of two: truncation to LG bits is the modulo.
        ofs[k]    <= LG'(ofs[k] + cnt_i[k]);
        base_o[k] <= ofs[k];
      end
    end
  end
endmodule
