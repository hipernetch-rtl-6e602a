// tb_hn_adder_tree: checks the pipelined adder tree against a software sum.
// Instance A: 16 one-bit inputs (popcount), S = 1, latency 4 cycles.
// Instance B: 5 three-bit inputs (padded to 8), S = 1, latency 3 cycles.
// A new random input enters every cycle.
module tb_hn_adder_tree;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0][0:0] ina;
  logic [4:0]       suma;
  logic [4:0][2:0]  inb;
  logic [4:0]       sumb;

  hn_adder_tree #(.N(16), .IW(1), .OW(5), .S(1), .LG(4), .FIRST(0)) ua (
    .clk(clk), .rst(rst), .in_i(ina), .sum_o(suma));
  hn_adder_tree #(.N(5), .IW(3), .OW(5), .S(1), .LG(4), .FIRST(0)) ub (
    .clk(clk), .rst(rst), .in_i(inb), .sum_o(sumb));

  int checks = 0, failures = 0;
  int ha [$], hb [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ina = '0; inb = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 300; c++) begin
      int sa, sb;
      ina = (c % 7 == 0) ? '1 : 16'($urandom);
      for (int i = 0; i < 5; i++) inb[i] = 3'($urandom);
      sa = 0; for (int i = 0; i < 16; i++) sa += ina[i];
      sb = 0; for (int i = 0; i < 5; i++) sb += inb[i];
      ha.push_front(sa); hb.push_front(sb);
      if (ha.size() > 4) begin checks++; if (suma != 5'(ha[4])) begin failures++; $display("A: %0d vs %0d", suma, ha[4]); end end
      if (hb.size() > 3) begin checks++; if (sumb != 5'(hb[3])) begin failures++; $display("B: %0d vs %0d", sumb, hb[3]); end end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
