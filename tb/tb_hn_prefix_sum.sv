// tb_hn_prefix_sum: checks the pipelined inclusive prefix sum.
// N = 16 values of 5 bits, S = 1 (latency 4 cycles) and S = 2 with the first
// level at the compulsory stage 5 (levels 5..8 keep stages 5 and 7: 2 cycles).
// Results are compared with a running sum modulo 32.
module tb_hn_prefix_sum;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0][4:0] din, o1, o2;

  hn_prefix_sum #(.N(16), .W(5), .S(1), .LG(4), .FIRST(0)) u1 (
    .clk(clk), .rst(rst), .in_i(din), .out_o(o1));
  hn_prefix_sum #(.N(16), .W(5), .S(2), .LG(4), .FIRST(5)) u2 (
    .clk(clk), .rst(rst), .in_i(din), .out_o(o2));

  int checks = 0, failures = 0;
  logic [15:0][4:0] h [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 300; c++) begin
      logic [15:0][4:0] e;
      logic [4:0] acc;
      for (int i = 0; i < 16; i++) din[i] = 5'($urandom_range(3, 0));
      acc = 0;
      for (int i = 0; i < 16; i++) begin acc += din[i]; e[i] = acc; end
      h.push_front(e);
      if (h.size() > 4) begin checks++; if (o1 != h[4]) begin failures++; $display("S=1 mismatch"); end end
      if (h.size() > 2) begin checks++; if (o2 != h[2]) begin failures++; $display("S=2 mismatch"); end end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
