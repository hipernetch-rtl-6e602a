// tb_hn_queue_size: packet loss against queue depth under heavy load.
//
// Four 16-port switches (queue depth 1, 2, 4 and 8 packets, index-only
// output arbiters) receive the same uniform Bernoulli traffic at input
// rate 0.99. For each depth the loss rate (dropped / offered) is measured.
// Checks: packets are conserved (offered - delivered - dropped is no more
// than the queue capacity still holding packets at the end), loss falls as the queues deepen, and the depth-1 loss lands in
// the few-percent range expected for this architecture (about 5% reported
// for depth 1 near full load; the check accepts 1% to 12%).
module tb_hn_queue_size;
  localparam int P = 16, W = 32, LG = 4, NCYC = 3000;
  localparam int NDEP = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0]         iv;
  logic [P-1:0][LG-1:0] idst;
  logic [P-1:0][W-1:0]  idat;
  logic [NDEP-1:0][P-1:0]       ov;
  logic [NDEP-1:0][P-1:0][LG:0] dc;

  for (genvar u = 0; u < NDEP; u++) begin : g_sw
    logic [P-1:0][W-1:0] od;
    hipernetch #(.P(P), .W(W), .S(2), .DEPTH(1 << u), .SIMPLE_ARB(1)) dut (
      .clk(clk), .rst(rst), .in_valid_i(iv), .in_dest_i(idst), .in_data_i(idat),
      .out_valid_o(ov[u]), .out_data_o(od), .drop_cnt_o(dc[u]));
  end

  int checks = 0, failures = 0;
  int offered = 0;
  int delivered [NDEP], dropped [NDEP];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst)
    for (int u = 0; u < NDEP; u++) begin
      delivered[u] += $countones(ov[u]);
      for (int k = 0; k < P; k++) dropped[u] += int'(dc[u][k]);
    end

  initial begin
    real rate [NDEP];
    iv = '0; idst = '0; idat = '0;
    for (int u = 0; u < NDEP; u++) begin delivered[u] = 0; dropped[u] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(posedge clk); #1;
      for (int s = 0; s < P; s++) begin
        iv[s] = $urandom_range(99, 0) != 0;
        idst[s] = LG'($urandom);
        idat[s] = W'(c);
        if (iv[s]) offered++;
      end
    end
    @(posedge clk); #1 iv = '0;
    repeat (400) @(posedge clk);
    @(negedge clk);
    for (int u = 0; u < NDEP; u++) begin
      rate[u] = real'(dropped[u]) / real'(offered);
      $display("depth %0d: offered %0d delivered %0d dropped %0d loss %0.2f%%",
               1 << u, offered, delivered[u], dropped[u], 100.0 * rate[u]);
      checks++;
      if (delivered[u] + dropped[u] > offered || delivered[u] + dropped[u] < offered - P * P * (1 << u)) begin
        failures++; $display("depth %0d: packets not conserved", 1 << u);
      end
    end
    for (int u = 1; u < NDEP; u++) begin
      checks++;
      if (rate[u] > rate[u-1]) begin failures++; $display("loss grows with depth %0d", 1 << u); end
    end
    checks++;
    if (rate[0] < 0.01 || rate[0] > 0.12) begin failures++; $display("depth-1 loss out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
