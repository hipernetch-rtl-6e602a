// tb_hn_subtractors: checks rotation = (offset - start) mod P.
// P = 16. Instance A sits at the compulsory stage 5 with S = 2 (registered,
// one cycle); instance B at stage 6 (register removed, combinational).
module tb_hn_subtractors;
  localparam int P = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0][3:0] base, ra, rb;
  logic [P-1:0][4:0] start;

  hn_subtractors #(.P(P), .S(2), .STAGE(5)) ua (.clk(clk), .rst(rst), .base_i(base), .start_i(start), .rot_o(ra));
  hn_subtractors #(.P(P), .S(2), .STAGE(6)) ub (.clk(clk), .rst(rst), .base_i(base), .start_i(start), .rot_o(rb));

  int checks = 0, failures = 0;
  int expv [P];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = '0; start = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 200; c++) begin
      for (int k = 0; k < P; k++) begin
        base[k] = 4'($urandom);
        start[k] = 5'($urandom_range(P, 0));
        expv[k] = (int'(base[k]) - int'(start[k]) + 2 * P) % P;
      end
      #1;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (rb[k] != 4'(expv[k])) begin failures++; $display("comb port %0d: %0d vs %0d", k, rb[k], expv[k]); end
      end
      @(posedge clk); #1;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (ra[k] != 4'(expv[k])) begin failures++; $display("reg port %0d: %0d vs %0d", k, ra[k], expv[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
