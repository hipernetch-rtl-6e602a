// hn_sort_net: pipelined Batcher odd-even merge sorting network.
//
// Sorts a batch of P elements (P a power of two) in ascending order of the
// key held in the KW most significant bits of each EW-bit element. In the
// switch an element is a packet {valid, dest, data} and the key is
// {valid, dest}, so invalid packets come first and valid packets end up
// grouped by destination port.
//
// The network has L*(L+1)/2 parallel steps (L = log2(P)); step s is global
// pipeline stage FIRST+s. Each step is a layer of compare-and-swap units
// followed by a stage boundary that is a register or, under register
// removal with factor S, a wire (see hn_pkg::stage_reg). The latency is
// therefore the number of registered steps, L*(L+1)/2 cycles when S = 1.
//
// tap_o shows the batch after the first TAP steps (TAP = 0: the input).
// Sorting only permutes the batch, so any tap carries the same set of
// packets; the offsets pipeline reads {valid, dest} from it so that it can
// start late and end together with the sorter. The comparator placement is
// the standard iterative description of Batcher's odd-even merge sort.
module hn_sort_net #(
  parameter int unsigned P     = 16,
  parameter int unsigned EW    = 8,
  parameter int unsigned KW    = 5,
  parameter int unsigned S     = 2,
  parameter int unsigned LG    = $clog2(P),
  parameter int unsigned FIRST = 0,
  parameter int unsigned TAP   = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [P-1:0][EW-1:0] in_i,
  output logic [P-1:0][EW-1:0] out_o,
  output logic [P-1:0][EW-1:0] tap_o
);
  localparam int unsigned NS = hn_pkg::sn_len(LG);

  // Merge size p and comparator distance k of step s.
  function automatic int unsigned step_p(int unsigned s);
    int unsigned n, p, k;
    n = 0;
    for (p = 1; p < P; p = p * 2)
      for (k = p; k >= 1; k = k / 2) begin
        if (n == s) return p;
        n++;
      end
    return 1;
  endfunction

  function automatic int unsigned step_k(int unsigned s);
    int unsigned n, p, k;
    n = 0;
    for (p = 1; p < P; p = p * 2)
      for (k = p; k >= 1; k = k / 2) begin
        if (n == s) return k;
        n++;
      end
    return 1;
  endfunction

  // 1 when position x is the lower input of a comparator (x, x+k) in step s.
  function automatic bit is_lo(int unsigned s, int unsigned x);
    int unsigned p, k, j0;
    p  = step_p(s);
    k  = step_k(s);
    j0 = k % p;
    if (x < j0) return 1'b0;
    if (((x - j0) % (2 * k)) >= k) return 1'b0;
    if (x + k >= P) return 1'b0;
    return (x / (2 * p)) == ((x + k) / (2 * p));
  endfunction

  function automatic bit is_hi(int unsigned s, int unsigned x);
    if (x < step_k(s)) return 1'b0;
    return is_lo(s, x - step_k(s));
  endfunction

  // Each step has its own input and output nets (cur, nxt, q) so that no
  // array is shared across steps.
  for (genvar s = 0; s < NS; s++) begin : g_step
    logic [P-1:0][EW-1:0] cur, nxt, q;
    if (s == 0) begin : g_first
      assign cur = in_i;
    end else begin : g_chain
      assign cur = g_step[s-1].q;
    end
    for (genvar x = 0; x < P; x++) begin : g_pos
      if (is_lo(s, x)) begin : g_cas
        hn_cas #(.EW(EW), .KW(KW)) u_cas (
          .a (cur[x]),
          .b (cur[x+step_k(s)]),
          .lo(nxt[x]),
          .hi(nxt[x+step_k(s)])
        );
      end else if (!is_hi(s, x)) begin : g_pass
        assign nxt[x] = cur[x];
      end
    end
    hn_stage_reg #(.W(P*EW), .REG(hn_pkg::stage_reg(FIRST + s, LG, S))) u_reg (
      .clk(clk), .rst(rst), .d(nxt), .q(q)
    );
  end

  assign out_o = g_step[NS-1].q;
  if (TAP == 0) begin : g_tap_in
    assign tap_o = in_i;
  end else begin : g_tap_st
    assign tap_o = g_step[TAP-1].q;
  end
endmodule
