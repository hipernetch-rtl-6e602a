// tb_hn_offset_counters: checks the per-port queue offset counters.
// P = 8. Random per-port counts 0..8 each cycle; base_o must show, one cycle
// later, the sum of all earlier counts of that port modulo 8.
module tb_hn_offset_counters;
  localparam int P = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [P-1:0][3:0] cnt;
  logic [P-1:0][2:0] base;

  hn_offset_counters #(.P(P)) dut (.clk(clk), .rst(rst), .cnt_i(cnt), .base_o(base));

  int checks = 0, failures = 0;
  int model [P];
  int expb [P];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt = '0;
    for (int k = 0; k < P; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 300; c++) begin
      for (int k = 0; k < P; k++) begin
        cnt[k] = 4'($urandom_range(P, 0));
        expb[k] = model[k];
        model[k] = (model[k] + cnt[k]) % P;
      end
      @(posedge clk); #1;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (base[k] != 3'(expb[k])) begin failures++; $display("port %0d: %0d vs %0d", k, base[k], expb[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
