// hn_cprr_arbiter: the combined parallel round-robin arbiter.
//
// Takes up to P packets per cycle, one per input port, and writes each into
// one of the P queues of its destination port's FIFO group such that, for
// every port, consecutive packets go to consecutive queues (mod P): the
// queues of a group look as if they were filled one after the other by a
// round-robin arbiter, although up to P packets per port are placed per
// cycle. It behaves like P parallel round-robin arbiters, one per output
// port, but shares a single sorting network among them.
//
// Two pipelines run side by side and end at the same stage:
//   sorting network  sorts the batch on {valid, dest}: invalid slots first,
//                    then the packets grouped by destination port;
//   offsets          P+1 popcount adder trees (invalid slots, packets per
//                    port), the offset counters (the compulsory register,
//                    holding each port's next queue index) in parallel with
//                    a prefix sum (start of each port's group in the sorted
//                    batch), and the subtractors (rotation = offset - start).
// The shorter pipeline is aligned: for P <= 8 the sorted batch goes through
// a synchronising shift register; for P > 8 the offsets pipeline starts
// late, reading {valid, dest} from a middle stage of the sorting network.
// The sorted batch is then broadcast to P rotators, one per port, and each
// rotator's output is filtered down to that port's packets.
//
// Interface: in_valid_i/in_dest_i/in_data_i, one packet per input port and
// cycle, no handshake (the pipeline never stalls). wr_en_o[k][q] writes
// wr_data_o[k][q] into queue q of port k's FIFO group.
// Timing: LAT = hn_pkg::latency_opt(log2 P, S) cycles from input to the
// write strobe (14 stages for P = 16; 7 cycles with S = 2).
module hn_cprr_arbiter #(
  parameter int unsigned P  = 16,
  parameter int unsigned W  = 512,
  parameter int unsigned S  = 2,
  parameter int unsigned LG = $clog2(P)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [P-1:0]                 in_valid_i,
  input  logic [P-1:0][LG-1:0]         in_dest_i,
  input  logic [P-1:0][W-1:0]          in_data_i,
  output logic [P-1:0][P-1:0]          wr_en_o,
  output logic [P-1:0][P-1:0][W-1:0]   wr_data_o
);
  localparam int unsigned EW  = 1 + LG + W;        // {valid, dest, data}
  localparam int unsigned KW  = 1 + LG;            // sort key {valid, dest}
  localparam int unsigned CW  = LG + 1;            // counts 0..P
  localparam int unsigned NSN = hn_pkg::sn_len(LG);
  localparam int unsigned PRE = hn_pkg::pre_len(LG);
  localparam int unsigned OS  = hn_pkg::off_start(LG);
  localparam int unsigned IDX = hn_pkg::idx_comp(LG);

  // ---------------------------------------------------------------- sorting
  logic [P-1:0][EW-1:0] batch, sorted, sorted_al, tap;

  always_comb begin
    for (int i = 0; i < P; i++)
      batch[i] = {in_valid_i[i], in_dest_i[i], in_data_i[i]};
  end

  hn_sort_net #(.P(P), .EW(EW), .KW(KW), .S(S), .LG(LG), .FIRST(0), .TAP(OS)) u_sort (
    .clk(clk), .rst(rst), .in_i(batch), .out_o(sorted), .tap_o(tap)
  );

  // Align the sorted batch with the end of the offsets pipeline (P <= 8).
  hn_delay #(.W(P*EW), .N(PRE - NSN), .S(S), .LG(LG), .FIRST(NSN)) u_sn_sync (
    .clk(clk), .rst(rst), .d(sorted), .q(sorted_al)
  );

  // ---------------------------------------------------------------- offsets
  logic [P-1:0]                 is_null;
  logic [P-1:0][P-1:0]          is_port;   // [port][slot]
  logic [CW-1:0]                null_cnt;
  logic [P-1:0][CW-1:0]         port_cnt;
  logic [P-1:0][CW-1:0]         ps_in, ps_out;
  logic [P-1:0][LG-1:0]         base, base_al, rot;

  always_comb begin
    for (int i = 0; i < P; i++) begin
      is_null[i] = !tap[i][EW-1];
      for (int k = 0; k < P; k++)
        is_port[k][i] = tap[i][EW-1] && (tap[i][W +: LG] == LG'(k));
    end
  end

  hn_adder_tree #(.N(P), .IW(1), .OW(CW), .S(S), .LG(LG), .FIRST(OS)) u_null_tree (
    .clk(clk), .rst(rst), .in_i(is_null), .sum_o(null_cnt)
  );

  for (genvar k = 0; k < P; k++) begin : g_tree
    hn_adder_tree #(.N(P), .IW(1), .OW(CW), .S(S), .LG(LG), .FIRST(OS)) u_port_tree (
      .clk(clk), .rst(rst), .in_i(is_port[k]), .sum_o(port_cnt[k])
    );
  end

  // Compulsory register stage IDX: offset counters.
  hn_offset_counters #(.P(P), .LG(LG), .CW(CW)) u_ofs (
    .clk(clk), .rst(rst), .cnt_i(port_cnt), .base_o(base)
  );

  // Prefix sum over {null, cnt[0], ..., cnt[P-2]}, stages IDX..IDX+LG-1.
  always_comb begin
    ps_in[0] = null_cnt;
    for (int k = 1; k < P; k++) ps_in[k] = port_cnt[k-1];
  end

  hn_prefix_sum #(.N(P), .W(CW), .S(S), .LG(LG), .FIRST(IDX)) u_psum (
    .clk(clk), .rst(rst), .in_i(ps_in), .out_o(ps_out)
  );

  // The offsets wait for the prefix sum: stages IDX+1..IDX+LG-1.
  hn_delay #(.W(P*LG), .N(LG - 1), .S(S), .LG(LG), .FIRST(IDX + 1)) u_base_sync (
    .clk(clk), .rst(rst), .d(base), .q(base_al)
  );

  hn_subtractors #(.P(P), .LG(LG), .CW(CW), .S(S), .STAGE(PRE - 1)) u_sub (
    .clk(clk), .rst(rst), .base_i(base_al), .start_i(ps_out), .rot_o(rot)
  );

  // ---------------------------------------------------- rotators and filters
  for (genvar k = 0; k < P; k++) begin : g_port
    logic [P-1:0][EW-1:0] rotated;

    hn_barrel_shifter #(.N(P), .EW(EW), .S(S), .LG(LG), .FIRST(PRE)) u_rot (
      .clk(clk), .rst(rst), .in_i(sorted_al), .amt_i(rot[k]), .out_o(rotated)
    );

    hn_filter #(.N(P), .DW(LG), .W(W), .PORT(k)) u_filt (
      .in_i(rotated), .keep_o(wr_en_o[k]), .data_o(wr_data_o[k])
    );
  end
endmodule
