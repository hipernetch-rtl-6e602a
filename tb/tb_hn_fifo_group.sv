// tb_hn_fifo_group: checks one port's FIFO group against queue models.
// P = 4 queues of DEPTH = 2, random writes and pops. Checked every cycle:
// nempty and head of each queue, and the number of packets dropped because
// their queue was full (a pop in the same cycle frees the slot).
module tb_hn_fifo_group;
  localparam int P = 4, W = 8, D = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0]        wr, rd, nempty;
  logic [P-1:0][W-1:0] wdat, head;
  logic [2:0]          drop;

  hn_fifo_group #(.P(P), .W(W), .DEPTH(D), .CW(3)) dut (
    .clk(clk), .rst(rst), .wr_en_i(wr), .wr_data_i(wdat), .rd_i(rd),
    .nempty_o(nempty), .head_o(head), .drop_o(drop));

  int checks = 0, failures = 0, ndrops = 0;
  logic [W-1:0] mq [P][$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0; rd = '0; wdat = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 600; c++) begin
      int edrop;
      logic [P-1:0] popm;
      wr = 4'($urandom); rd = (c % 50 < 20) ? 4'($urandom) & 4'($urandom) : 4'($urandom);
      for (int q = 0; q < P; q++) wdat[q] = 8'($urandom);
      #1;
      edrop = 0;
      for (int q = 0; q < P; q++) begin
        checks++;
        if (nempty[q] != (mq[q].size() != 0)) begin failures++; $display("q%0d nempty", q); end
        if (mq[q].size() != 0) begin
          checks++;
          if (head[q] != mq[q][0]) begin failures++; $display("q%0d head %h vs %h", q, head[q], mq[q][0]); end
        end
        popm[q] = rd[q] && mq[q].size() != 0;
        if (wr[q] && mq[q].size() == D && !popm[q]) edrop++;
      end
      checks++;
      if (drop != 3'(edrop)) begin failures++; $display("drop %0d vs %0d", drop, edrop); end
      ndrops += edrop;
      for (int q = 0; q < P; q++) begin
        if (popm[q]) void'(mq[q].pop_front());
        if (wr[q] && mq[q].size() < D) mq[q].push_back(wdat[q]);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (ndrops == 0) begin failures++; $display("no drops exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
