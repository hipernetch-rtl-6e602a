// tb_hn_sort_net: checks the pipelined odd-even merge sorting network.
//
// A new random batch enters every cycle. For each batch the output,
// LAT cycles later, must be sorted on the key (top KW bits) and hold exactly
// the input elements. Two instances: S = 1 (all 10 stages registered for
// P = 16) and S = 2 (5 registers: stages 1, 3, 5, 7, 9 kept around the
// compulsory stage 5). The tap after 3 steps must also carry the same
// multiset of elements.
module tb_hn_sort_net;
  localparam int unsigned P = 16, EW = 12, KW = 5;
  localparam int LAT1 = 10, LAT2 = 5;

  logic clk = 0, rst = 1;
  logic [P-1:0][EW-1:0] din, o1, o2, t1, t2;
  always #5 clk = ~clk;

  hn_sort_net #(.P(P), .EW(EW), .KW(KW), .S(1), .LG(4), .FIRST(0), .TAP(3)) u1 (
    .clk(clk), .rst(rst), .in_i(din), .out_o(o1), .tap_o(t1));
  hn_sort_net #(.P(P), .EW(EW), .KW(KW), .S(2), .LG(4), .FIRST(0), .TAP(0)) u2 (
    .clk(clk), .rst(rst), .in_i(din), .out_o(o2), .tap_o(t2));

  int checks = 0, failures = 0;
  logic [P-1:0][EW-1:0] hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0][EW-1:0] sort_full(logic [P-1:0][EW-1:0] a);
    logic [EW-1:0] t;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P - 1 - i; j++)
        if (a[j] > a[j+1]) begin t = a[j]; a[j] = a[j+1]; a[j+1] = t; end
    return a;
  endfunction

  task automatic check_out(logic [P-1:0][EW-1:0] o, logic [P-1:0][EW-1:0] ref_in, string nm);
    checks++;
    for (int i = 0; i < P - 1; i++)
      if (o[i][EW-1 -: KW] > o[i+1][EW-1 -: KW]) begin
        failures++; $display("%s: not sorted at %0d", nm, i); return;
      end
    checks++;
    if (sort_full(o) != sort_full(ref_in)) begin failures++; $display("%s: elements lost", nm); end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 300; c++) begin
      for (int i = 0; i < P; i++) din[i] = EW'($urandom);
      // Force many equal keys now and then.
      if (c % 3 == 0) for (int i = 0; i < P; i++) din[i][EW-1 -: KW] = KW'($urandom_range(3, 0));
      hist.push_front(din);
      // Tap of instance 1 after 3 steps: same multiset, 3 cycles late.
      if (hist.size() > 3) begin
        checks++;
        if (sort_full(t1) != sort_full(hist[3])) begin failures++; $display("tap mismatch"); end
      end
      if (hist.size() > LAT2) check_out(o2, hist[LAT2], "S=2");
      if (hist.size() > LAT1) check_out(o1, hist[LAT1], "S=1");
      checks++;
      if (t2 != din) begin failures++; $display("TAP=0 must be the input"); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
