// tb_hn_barrel_shifter: checks the pipelined rotator.
// N = 16 elements of 8 bits, S = 1: latency 4 cycles; out[q] must equal
// in[(q - amt) mod 16] of the batch that entered 4 cycles earlier, with a
// new batch and amount every cycle.
module tb_hn_barrel_shifter;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N-1:0][7:0] din, dout;
  logic [3:0]        amt;

  hn_barrel_shifter #(.N(N), .EW(8), .S(1), .FIRST(0)) dut (
    .clk(clk), .rst(rst), .in_i(din), .amt_i(amt), .out_o(dout));

  int checks = 0, failures = 0;
  logic [N-1:0][7:0] h [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; amt = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 300; c++) begin
      logic [N-1:0][7:0] e;
      for (int i = 0; i < N; i++) din[i] = 8'($urandom);
      amt = 4'($urandom);
      for (int q = 0; q < N; q++) e[q] = din[(q - int'(amt) + N) % N];
      h.push_front(e);
      if (h.size() > 4) begin checks++; if (dout != h[4]) begin failures++; $display("mismatch at %0d", c); end end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
