// hn_fifo_group: the FIFO group of one output port.
//
// P queues of DEPTH packets each (W-bit payload), held in registers. Queue
// q accepts wr_en_i[q]/wr_data_i[q] from the combined arbiter; all P queues
// may be written in the same cycle. A packet that finds its queue full is
// dropped (tail drop; the arbiter pipeline itself never blocks) and counted
// in drop_o for that cycle. A queue that is popped in the same cycle frees
// its slot for that cycle's write (a choice of this implementation). head_o[q] is the oldest packet of queue
// q, valid when nempty_o[q]; rd_i[q] removes it.
// Timing: a packet written at a clock edge is visible on head_o right after
// that edge (one cycle in the queue at least). Pointers reset to empty.
module hn_fifo_group #(
  parameter int unsigned P     = 16,
  parameter int unsigned W     = 512,
  parameter int unsigned DEPTH = 1,
  parameter int unsigned CW    = $clog2(P) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [P-1:0]         wr_en_i,
  input  logic [P-1:0][W-1:0]  wr_data_i,
  input  logic [P-1:0]         rd_i,
  output logic [P-1:0]         nempty_o,
  output logic [P-1:0][W-1:0]  head_o,
  output logic [CW-1:0]        drop_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem  [P][DEPTH];
  logic [AW-1:0] wptr [P];
  logic [AW-1:0] rptr [P];
  logic [NW-1:0] used [P];
  logic [P-1:0]  push, pop, drop;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_comb begin
    drop_o = '0;
    for (int q = 0; q < P; q++) begin
      pop[q]      = rd_i[q] && (used[q] != '0);
      push[q]     = wr_en_i[q] && ((used[q] != NW'(DEPTH)) || pop[q]);
      drop[q]     = wr_en_i[q] && !push[q];
      drop_o      = drop_o + CW'(drop[q]);
      nempty_o[q] = used[q] != '0;
      head_o[q]   = mem[q][rptr[q]];
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < P; q++)
      if (push[q]) mem[q][wptr[q]] <= wr_data_i[q];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int q = 0; q < P; q++) begin
        wptr[q] <= '0;
        rptr[q] <= '0;
        used[q] <= '0;
      end
    end else begin
      for (int q = 0; q < P; q++) begin
        if (push[q]) wptr[q] <= nxt(wptr[q]);
        if (pop[q])  rptr[q] <= nxt(rptr[q]);
        used[q] <= used[q] + NW'(push[q]) - NW'(pop[q]);
      end
    end
  end

  // A write only ever lands in a queue with room.
  for (genvar q = 0; q < P; q++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (rst)
      push[q] |-> (used[q] != NW'(DEPTH) || pop[q]));
  end
endmodule
