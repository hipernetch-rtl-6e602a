// tb_hn_filter: checks the per-port output filter (combinational).
// N = 16 elements {valid, dest[3:0], data[15:0]}, PORT = 5: keep must be
// valid && dest == 5 and the payload must pass through.
module tb_hn_filter;
  localparam int N = 16;
  logic [N-1:0][20:0] din;
  logic [N-1:0]       keep;
  logic [N-1:0][15:0] dout;

  hn_filter #(.N(N), .DW(4), .W(16), .PORT(5)) dut (.in_i(din), .keep_o(keep), .data_o(dout));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 300; c++) begin
      for (int i = 0; i < N; i++) begin
        din[i] = 21'($urandom);
        if ($urandom_range(1, 0) == 1) din[i][19:16] = 4'd5;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (keep[i] != (din[i][20] && din[i][19:16] == 4'd5) || dout[i] != din[i][15:0]) begin
          failures++; $display("element %0d wrong", i);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
