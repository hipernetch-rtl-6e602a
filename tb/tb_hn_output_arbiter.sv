// tb_hn_output_arbiter: checks both output-arbiter policies against models.
// P = 4, random queue occupancy each cycle.
//   SIMPLE = 1: serves only the queue at its index, waits when it is empty.
//   SIMPLE = 0: serves the first non-empty queue at or after its index.
// Checked every cycle: which queue is popped, out_valid and out_data.
module tb_hn_output_arbiter;
  localparam int P = 4, W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0]        ne;
  logic [P-1:0][W-1:0] head;
  logic [P-1:0]        rd1, rd0;
  logic                v1, v0;
  logic [W-1:0]        d1, d0;

  hn_output_arbiter #(.P(P), .W(W), .SIMPLE(1)) u1 (.clk(clk), .rst(rst), .nempty_i(ne), .head_i(head), .rd_o(rd1), .out_valid_o(v1), .out_data_o(d1));
  hn_output_arbiter #(.P(P), .W(W), .SIMPLE(0)) u0 (.clk(clk), .rst(rst), .nempty_i(ne), .head_i(head), .rd_o(rd0), .out_valid_o(v0), .out_data_o(d0));

  int checks = 0, failures = 0, nwait = 0, nskip = 0;
  int i1 = 0, i0 = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ne = '0; head = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 500; c++) begin
      logic [P-1:0] e1, e0;
      int s0;
      ne = 4'($urandom);
      for (int q = 0; q < P; q++) head[q] = 8'($urandom);
      #1;
      // Simple policy.
      e1 = '0;
      if (ne[i1]) e1[i1] = 1'b1; else if (ne != 0) nwait++;
      checks++;
      if (rd1 != e1 || v1 != ne[i1] || (ne[i1] && d1 != head[i1])) begin failures++; $display("simple wrong at %0d", c); end
      // Round-robin policy.
      s0 = -1;
      for (int j = 0; j < P; j++) if (s0 < 0 && ne[(i0 + j) % P]) s0 = (i0 + j) % P;
      e0 = '0;
      if (s0 >= 0) e0[s0] = 1'b1;
      if (s0 >= 0 && s0 != i0) nskip++;
      checks++;
      if (rd0 != e0 || v0 != (s0 >= 0) || (s0 >= 0 && d0 != head[s0])) begin failures++; $display("rr wrong at %0d", c); end
      if (ne[i1]) i1 = (i1 + 1) % P;
      if (s0 >= 0) i0 = (s0 + 1) % P;
      @(posedge clk); #1;
    end
    checks++;
    if (nwait == 0 || nskip == 0) begin failures++; $display("policies not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
