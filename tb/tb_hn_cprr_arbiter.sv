// tb_hn_cprr_arbiter: checks the combined parallel round-robin arbiter.
//
// Six instances against the published latency table:
//   P = 2,  S = 1: 4 cycles
//   P = 4,  S = 1: 7 cycles   (sorting network shorter: synchronising SR)
//   P = 8,  S = 1: 10 cycles  (6-stage sorter, 7-stage offsets pipeline)
//   P = 16, S = 2: 7 cycles   (offsets pipeline taps the sorter late)
//   P = 16, S = 4: 4 cycles
//   P = 32, S = 4: 5 cycles   (20 stages, compulsory register at stage 9)
// Each cycle a random batch enters (idle slots, hot-spot destinations).
// The reference keeps one queue offset per port: the c packets for port k
// of a batch must be written, LAT cycles later, to queues offset..offset+c-1
// (mod P) of port k and nowhere else, carrying exactly those payloads.
module tb_hn_cprr_arbiter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic go = 0;
  logic [5:0] done;

  hn_cprr_arbiter_check #(.P(4),  .S(1), .LAT(7))  c4  (.clk(clk), .rst(rst), .go(go), .done(done[0]), .checks_o(), .fails_o());
  hn_cprr_arbiter_check #(.P(8),  .S(1), .LAT(10)) c8  (.clk(clk), .rst(rst), .go(go), .done(done[1]), .checks_o(), .fails_o());
  hn_cprr_arbiter_check #(.P(16), .S(2), .LAT(7))  c16 (.clk(clk), .rst(rst), .go(go), .done(done[2]), .checks_o(), .fails_o());
  hn_cprr_arbiter_check #(.P(2),  .S(1), .LAT(4))  c2  (.clk(clk), .rst(rst), .go(go), .done(done[3]), .checks_o(), .fails_o());
  hn_cprr_arbiter_check #(.P(16), .S(4), .LAT(4))  c16s4 (.clk(clk), .rst(rst), .go(go), .done(done[4]), .checks_o(), .fails_o());
  hn_cprr_arbiter_check #(.P(32), .S(4), .LAT(5))  c32s4 (.clk(clk), .rst(rst), .go(go), .done(done[5]), .checks_o(), .fails_o());

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0; go = 1;
    wait (&done);
    checks   = c4.checks_o + c8.checks_o + c16.checks_o + c2.checks_o + c16s4.checks_o + c32s4.checks_o;
    failures = c4.fails_o + c8.fails_o + c16.fails_o + c2.fails_o + c16s4.fails_o + c32s4.fails_o;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
