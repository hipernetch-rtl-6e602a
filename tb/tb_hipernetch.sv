// tb_hipernetch: end-to-end test of the switch at its default size
// (16 ports, 512-bit payloads, S = 2, queue depth 1).
//
// Every packet carries a unique tag {source, sequence} spread over the whole
// payload. A scoreboard checks that each packet leaves exactly once, at its
// own destination, intact, no earlier than the pipeline latency allows and,
// until the first drop, in arrival-cycle order per port. The expected
// latency comes from the published latency table (7 cycles of pipeline for
// P = 16, S = 2, plus one cycle in the queue), not from the RTL.
// Phases: isolated packets (exact latency), an all-to-one burst of P
// packets in one cycle (no loss, one packet per cycle out), full-rate
// permutation traffic (line rate on every port), random Bernoulli traffic
// with idle slots, and an overload that fills the queues, drops packets and
// knocks the index-only output arbiters out of step. At the end,
// sent = received + dropped + still queued for every port. Each mechanism is
// counted and a mechanism that never happened is a failure.
module tb_hipernetch;
  localparam int unsigned P     = 16;
  localparam int unsigned W     = 512;
  localparam int unsigned S     = 2;
  localparam int unsigned DEPTH = 1;
  localparam int unsigned LG    = $clog2(P);

  // Published pipeline latency (cycles) after register removal.
  function automatic int tab_latency(int p, int s);
    int lp;
    lp = $clog2(p);
    case (s)
      1: case (lp) 1: return 4; 2: return 7; 3: return 10; 4: return 14; 5: return 20; default: return -1; endcase
      2: case (lp) 1: return 2; 2: return 4; 3: return 5;  4: return 7;  5: return 10; default: return -1; endcase
      4: case (lp) 1: return 1; 2: return 2; 3: return 2;  4: return 4;  5: return 5;  default: return -1; endcase
      8: case (lp) 1: return 1; 2: return 1; 3: return 1;  4: return 2;  5: return 3;  default: return -1; endcase
      default: return -1;
    endcase
  endfunction

  localparam int P2P = tab_latency(P, S) + 1;

  logic clk = 1'b0, rst = 1'b1;
  logic [P-1:0]          in_valid;
  logic [P-1:0][LG-1:0]  in_dest;
  logic [P-1:0][W-1:0]   in_data;
  logic [P-1:0]          out_valid;
  logic [P-1:0][W-1:0]   out_data;
  logic [P-1:0][LG:0]    drop_cnt;

  hipernetch dut (
    .clk(clk), .rst(rst),
    .in_valid_i(in_valid), .in_dest_i(in_dest), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_data_o(out_data), .drop_cnt_o(drop_cnt)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mkdata(logic [31:0] tag);
    logic [W-1:0] d;
    for (int i = 0; i < W; i++) d[i] = tag[i % 32] ^ ((i / 32) % 3 == 1);
    return d;
  endfunction

  // Scoreboard.
  int          arr_cyc [int];     // tag -> arrival cycle
  int          arr_dst [int];     // tag -> destination
  int          sent [P], recvd [P], dropped [P];
  int          last_arr [P];
  int          seq = 0;
  bit          any_drop = 1'b0;
  int          early_lat = 0;     // packets out at exactly the minimum latency

  // Mechanism counters.
  int n_burst_nolss = 0, n_line_rate = 0, n_drop = 0, n_desync = 0, n_wrap = 0, n_null = 0;

  task automatic clear_in();
    in_valid = '0; in_dest = '0; in_data = '0;
  endtask

  task automatic put(int src, int dst);
    logic [31:0] tag;
    tag = {8'(src), 24'(seq)};
    seq++;
    in_valid[src] = 1'b1;
    in_dest[src]  = LG'(dst);
    in_data[src]  = mkdata(tag);
    arr_cyc[int'(tag)] = cyc;
    arr_dst[int'(tag)] = dst;
    sent[dst]++;
  endtask

  // Output monitor (mid-cycle, after inputs and state have settled).
  always @(negedge clk) if (!rst) begin
    for (int k = 0; k < P; k++) begin
      dropped[k] += int'(drop_cnt[k]);
      if (drop_cnt[k] != 0) begin any_drop = 1'b1; n_drop++; end
      if (out_valid[k]) begin
        logic [31:0] tag;
        int t;
        tag = out_data[k][31:0];
        t = int'(tag);
        checks++;
        if (!arr_cyc.exists(t)) begin
          failures++; $display("port %0d: unknown or duplicate packet %h", k, tag);
        end else begin
          if (out_data[k] != mkdata(tag)) begin failures++; $display("port %0d: payload corrupted", k); end
          if (arr_dst[t] != k) begin failures++; $display("packet %h for %0d left on %0d", tag, arr_dst[t], k); end
          if (cyc - arr_cyc[t] < P2P) begin failures++; $display("packet %h too early: %0d", tag, cyc - arr_cyc[t]); end
          if (cyc - arr_cyc[t] == P2P) early_lat++;
          if (!any_drop && arr_cyc[t] < last_arr[k]) begin failures++; $display("port %0d out of order", k); end
          last_arr[k] = arr_cyc[t];
          arr_cyc.delete(t);
          arr_dst.delete(t);
          recvd[k]++;
        end
      end
    end
  end

  // Desynchronised output arbiter: queues hold packets but none is sent.
  for (genvar k = 0; k < P; k++) begin : g_mon
    always @(negedge clk) if (!rst && !out_valid[k] && |dut.g_port[k].nempty) n_desync++;
  end

  int queued;
  int outs_seen;
  int c0;
  int outs_at [int];   // cycle -> packets out in that cycle

  always @(negedge clk) if (!rst) outs_at[cyc] = $countones(out_valid);

  initial begin
    clear_in();
    for (int k = 0; k < P; k++) begin sent[k] = 0; recvd[k] = 0; dropped[k] = 0; last_arr[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Phase A: isolated packets, exact port-to-port latency.
    for (int i = 0; i < 4; i++) begin
      int st;
      @(posedge clk); #1;
      clear_in();
      put(3 + i, 5 + 2 * i);
      st = cyc;
      @(posedge clk); #1 clear_in();
      while (!out_valid[5 + 2 * i] && cyc < st + 40) @(negedge clk);
      checks++;
      if (cyc - st != P2P) begin failures++; $display("latency %0d, expected %0d", cyc - st, P2P); end
      repeat (3) @(posedge clk);
    end

    // Phase B: all P inputs to one port in one cycle.
    @(posedge clk); #1 clear_in();
    for (int s = 0; s < P; s++) put(s, 2);
    @(posedge clk); #1 clear_in();
    repeat (P2P - 1) @(posedge clk);
    @(negedge clk);
    outs_seen = 0;
    for (int c = 0; c < P; c++) begin
      if (out_valid[2]) outs_seen++;
      @(negedge clk);
    end
    checks++;
    if (outs_seen != P) begin failures++; $display("burst: %0d of %0d in consecutive cycles", outs_seen, P); end
    else n_burst_nolss++;
    repeat (5) @(posedge clk);

    // Phase C: full-rate permutation traffic, every port busy every cycle.
    for (int c = 0; c < 64; c++) begin
      @(posedge clk); #1 clear_in();
      if (c == 0) c0 = cyc;
      for (int s = 0; s < P; s++) put(s, (s + c) % P);
    end
    @(posedge clk); #1 clear_in();
    repeat (P2P + 4) @(posedge clk);
    outs_seen = 0;
    for (int c = 0; c < 64; c++)
      if (outs_at.exists(c0 + P2P + c)) outs_seen += outs_at[c0 + P2P + c];
    checks++;
    if (outs_seen != 64 * P) begin
      failures++; $display("line rate: %0d of %0d", outs_seen, 64 * P);
      for (int c = -2; c < 68; c++) if (outs_at.exists(c0 + P2P + c)) $write("%0d:%0d ", c, outs_at[c0 + P2P + c]);
      $display("");
    end
    else n_line_rate++;
    if (sent[0] > P) n_wrap++;      // offset counters wrapped modulo P
    repeat (10) @(posedge clk);

    // Phase D: random Bernoulli traffic, rate 1/2, uniform destinations.
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1 clear_in();
      for (int s = 0; s < P; s++)
        if ($urandom_range(1, 0) == 1) put(s, $urandom_range(P - 1, 0));
        else n_null++;
    end
    @(posedge clk); #1 clear_in();
    repeat (60) @(posedge clk);

    // Phase E: overload of port 0 and port 7: drops and desynchronisation.
    for (int c = 0; c < 6; c++) begin
      @(posedge clk); #1 clear_in();
      for (int s = 0; s < P; s++) put(s, (s < P / 2) ? 0 : 7);
    end
    @(posedge clk); #1 clear_in();
    repeat (40) @(posedge clk);

    // Phase F: light traffic to the overloaded ports after the drops.
    for (int c = 0; c < 40; c++) begin
      @(posedge clk); #1 clear_in();
      if (c % 4 == 0) begin put(c % P, 0); put((c + 5) % P, 7); end
    end
    @(posedge clk); #1 clear_in();
    repeat (40) @(posedge clk);

    // Conservation per port.
    @(negedge clk);
    for (int k = 0; k < P; k++) begin
      queued = 0;
      case (k)
        0: queued = $countones(dut.g_port[0].nempty);   1: queued = $countones(dut.g_port[1].nempty);
        2: queued = $countones(dut.g_port[2].nempty);   3: queued = $countones(dut.g_port[3].nempty);
        4: queued = $countones(dut.g_port[4].nempty);   5: queued = $countones(dut.g_port[5].nempty);
        6: queued = $countones(dut.g_port[6].nempty);   7: queued = $countones(dut.g_port[7].nempty);
        8: queued = $countones(dut.g_port[8].nempty);   9: queued = $countones(dut.g_port[9].nempty);
        10: queued = $countones(dut.g_port[10].nempty); 11: queued = $countones(dut.g_port[11].nempty);
        12: queued = $countones(dut.g_port[12].nempty); 13: queued = $countones(dut.g_port[13].nempty);
        14: queued = $countones(dut.g_port[14].nempty); 15: queued = $countones(dut.g_port[15].nempty);
        default: queued = 0;
      endcase
      checks++;
      if (sent[k] != recvd[k] + dropped[k] + queued) begin
        failures++;
        $display("port %0d: sent %0d recvd %0d dropped %0d queued %0d", k, sent[k], recvd[k], dropped[k], queued);
      end
    end
    // The overload must have lost packets on both ports.
    checks++;
    if (dropped[0] == 0 || dropped[7] == 0) begin failures++; $display("no drops under overload"); end

    $display("mechanisms: burst_no_loss=%0d line_rate=%0d drops=%0d desync_waits=%0d offset_wrap=%0d null_slots=%0d min_latency_pkts=%0d",
             n_burst_nolss, n_line_rate, n_drop, n_desync, n_wrap, n_null, early_lat);
    checks++; if (n_burst_nolss == 0) begin failures++; $display("all-to-one burst never passed"); end
    checks++; if (n_line_rate == 0)   begin failures++; $display("line rate never reached"); end
    checks++; if (n_drop == 0)        begin failures++; $display("tail drop never happened"); end
    checks++; if (n_desync == 0)      begin failures++; $display("output arbiter never out of step"); end
    checks++; if (n_wrap == 0)        begin failures++; $display("offset counters never wrapped"); end
    checks++; if (n_null == 0)        begin failures++; $display("no idle input slots"); end
    checks++; if (early_lat == 0)     begin failures++; $display("no packet at minimum latency"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
