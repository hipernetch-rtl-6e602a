// tb_hn_delay: checks the synchronising shift register with register removal.
// A: 4 stages at global stages 2..5, S = 2, compulsory stage 5: stages 3 and
//    5 keep registers, so the delay is 2 cycles.
// B: 3 stages, S = 1: 3 cycles.  C: 0 stages: a wire.
module tb_hn_delay;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] d, qa, qb, qc;
  hn_delay #(.W(8), .N(4), .S(2), .LG(4), .FIRST(2)) ua (.clk(clk), .rst(rst), .d(d), .q(qa));
  hn_delay #(.W(8), .N(3), .S(1), .LG(4), .FIRST(0)) ub (.clk(clk), .rst(rst), .d(d), .q(qb));
  hn_delay #(.W(8), .N(0), .S(1), .LG(4), .FIRST(0)) uc (.clk(clk), .rst(rst), .d(d), .q(qc));

  int checks = 0, failures = 0;
  logic [7:0] h [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 200; c++) begin
      d = 8'($urandom);
      h.push_front(d);
      #1;
      checks++; if (qc != d) begin failures++; $display("wire mismatch"); end
      if (h.size() > 2) begin checks++; if (qa != h[2]) begin failures++; $display("A mismatch"); end end
      if (h.size() > 3) begin checks++; if (qb != h[3]) begin failures++; $display("B mismatch"); end end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
