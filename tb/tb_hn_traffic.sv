// tb_hn_traffic: the switch under the three synthetic traffic models used to
// judge the switching algorithm, 16 ports, queues deep enough (64 packets
// each) that nothing is dropped, so average queueing delay is measurable.
//   uniform Bernoulli: each input sends with probability r, destinations
//                      uniform over the 16 ports;
//   uniform bursty:    Markov source; bursts of mean length 32 to one
//                      uniformly chosen port, idle gaps sized for rate r;
//   nonuniform:        destination = source with probability 1/2, otherwise
//                      uniform over the other ports.
// Two switches run the same traffic: one with the index-only output
// arbiters, one with regular round-robin arbiters. Checks: every packet
// leaves once, at its port, at least 8 cycles after entry, in arrival
// order per port; no drops; with Bernoulli traffic at r = 0.8 the mean
// queueing delay stays near the M/D/1 value r/(2(1-r)) = 2 cycles.
module tb_hn_traffic;
  localparam int P = 16, W = 32, D = 64, LG = 4, P2P = 8;
  localparam int NCYC = 1500;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0]         iv;
  logic [P-1:0][LG-1:0] idst;
  logic [P-1:0][W-1:0]  idat;
  logic [1:0][P-1:0]        ov;
  logic [1:0][P-1:0][W-1:0] od;
  logic [1:0][P-1:0][LG:0]  dc;

  hipernetch #(.P(P), .W(W), .S(2), .DEPTH(D), .SIMPLE_ARB(1)) u_simple (
    .clk(clk), .rst(rst), .in_valid_i(iv), .in_dest_i(idst), .in_data_i(idat),
    .out_valid_o(ov[0]), .out_data_o(od[0]), .drop_cnt_o(dc[0]));
  hipernetch #(.P(P), .W(W), .S(2), .DEPTH(D), .SIMPLE_ARB(0)) u_rr (
    .clk(clk), .rst(rst), .in_valid_i(iv), .in_dest_i(idst), .in_data_i(idat),
    .out_valid_o(ov[1]), .out_data_o(od[1]), .drop_cnt_o(dc[1]));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int arr [2][int];
  int dst [int];
  int last [2][P];
  longint lat_sum [2];
  int nrecv [2], ndrop [2];
  int seq = 0;

  always @(negedge clk) if (!rst) begin
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < P; k++) begin
        ndrop[u] += int'(dc[u][k]);
        if (ov[u][k]) begin
          int t;
          t = int'(od[u][k]);
          checks++;
          if (!arr[u].exists(t)) begin failures++; $display("u%0d: unknown packet %h", u, t); end
          else begin
            if (dst[t] != k || cyc - arr[u][t] < P2P || arr[u][t] < last[u][k]) begin
              failures++; $display("u%0d port %0d: bad packet %h", u, k, t);
            end
            last[u][k] = arr[u][t];
            lat_sum[u] += cyc - arr[u][t] - P2P;
            nrecv[u]++;
            arr[u].delete(t);
          end
        end
      end
  end

  // Burst state per input for the bursty model.
  int bdst [P];
  bit bon [P];

  task automatic run(int model, real r, string nm, output real avgq);
    int sent;
    for (int u = 0; u < 2; u++) begin lat_sum[u] = 0; nrecv[u] = 0; ndrop[u] = 0; end
    for (int s = 0; s < P; s++) begin bon[s] = 0; bdst[s] = 0; end
    sent = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk); #1;
      iv = '0;
      for (int s = 0; s < P; s++) begin
        bit snd;
        int d;
        snd = 0; d = 0;
        case (model)
          0: begin snd = ($urandom_range(9999, 0) < int'(r * 10000)); d = $urandom_range(P - 1, 0); end
          1: begin
               // On: end the burst with probability 1/32; Off: start one with
               // probability chosen so that the on-fraction is r.
               if (bon[s]) begin if ($urandom_range(31, 0) == 0) bon[s] = 0; end
               else if ($urandom_range(9999, 0) < int'(10000.0 * r / (32.0 * (1.0 - r)))) begin
                 bon[s] = 1; bdst[s] = $urandom_range(P - 1, 0);
               end
               snd = bon[s]; d = bdst[s];
             end
          default: begin
               snd = ($urandom_range(9999, 0) < int'(r * 10000));
               if ($urandom_range(1, 0) == 0) d = s;
               else begin d = $urandom_range(P - 2, 0); if (d >= s) d++; end
             end
        endcase
        if (snd) begin
          logic [31:0] tag;
          tag = {8'(s), 24'(seq)}; seq++;
          iv[s] = 1; idst[s] = LG'(d); idat[s] = tag;
          arr[0][int'(tag)] = cyc; arr[1][int'(tag)] = cyc; dst[int'(tag)] = d;
          sent++;
        end
      end
    end
    @(posedge clk); #1 iv = '0;
    repeat (800) @(posedge clk);
    @(negedge clk);
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (nrecv[u] != sent || ndrop[u] != 0) begin
        failures++; $display("%s u%0d: sent %0d received %0d dropped %0d", nm, u, sent, nrecv[u], ndrop[u]);
      end
    end
    avgq = real'(lat_sum[0]) / real'(nrecv[0]);
    $display("%s r=%0.2f: packets %0d, mean queueing delay %0.2f (index-only) %0.2f (round-robin) cycles",
             nm, r, sent, avgq, real'(lat_sum[1]) / real'(nrecv[1]));
  endtask

  initial begin
    real q;
    iv = '0; idst = '0; idat = '0;
    for (int u = 0; u < 2; u++) for (int k = 0; k < P; k++) last[u][k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(0, 0.8, "bernoulli", q);
    checks++;
    if (q < 1.0 || q > 3.0) begin failures++; $display("Bernoulli delay %0.2f far from M/D/1 2.0", q); end
    run(1, 0.6, "bursty", q);
    run(2, 0.8, "nonuniform", q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
