// hn_cprr_arbiter_check: drives one hn_cprr_arbiter instance with random
// batches and checks its queue writes against a reference offset model.
// Used by tb_hn_cprr_arbiter; counts its checks and failures on its outputs.
module hn_cprr_arbiter_check #(
  parameter int P   = 8,
  parameter int S   = 1,
  parameter int LAT = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic go,
  output logic done,
  output int   checks_o,
  output int   fails_o
);
  localparam int LG = $clog2(P);
  localparam int W  = 16;

  logic [P-1:0]               in_valid;
  logic [P-1:0][LG-1:0]       in_dest;
  logic [P-1:0][W-1:0]        in_data;
  logic [P-1:0][P-1:0]        wr_en;
  logic [P-1:0][P-1:0][W-1:0] wr_data;

  hn_cprr_arbiter #(.P(P), .W(W), .S(S)) dut (
    .clk(clk), .rst(rst), .in_valid_i(in_valid), .in_dest_i(in_dest), .in_data_i(in_data),
    .wr_en_o(wr_en), .wr_data_o(wr_data));

  typedef struct {
    logic [P-1:0][P-1:0]        en;
    logic [P-1:0][P-1:0][W-1:0] dat;
  } exp_t;

  exp_t h [$];
  int   ofs [P];
  int   nfull = 0;

  // Expected writes of one batch; payloads of a port are matched as a set,
  // because the sorting network does not keep the arrival order of packets
  // that share a cycle and a destination.
  task automatic model(output exp_t e);
    int c;
    e.en = '0; e.dat = '0;
    for (int k = 0; k < P; k++) begin
      c = 0;
      for (int i = 0; i < P; i++)
        if (in_valid[i] && in_dest[i] == LG'(k)) begin
          e.en[k][(ofs[k] + c) % P] = 1'b1;
          e.dat[k][(ofs[k] + c) % P] = in_data[i];
          c++;
        end
      if (c == P) nfull++;
      ofs[k] = (ofs[k] + c) % P;
    end
  endtask

  task automatic compare(exp_t e);
    for (int k = 0; k < P; k++) begin
      logic [W-1:0] a [$], b [$];
      checks_o++;
      if (wr_en[k] != e.en[k]) begin
        fails_o++; $display("P=%0d port %0d: queues %b, expected %b", P, k, wr_en[k], e.en[k]);
        continue;
      end
      for (int q = 0; q < P; q++) if (e.en[k][q]) begin a.push_back(wr_data[k][q]); b.push_back(e.dat[k][q]); end
      a.sort(); b.sort();
      checks_o++;
      if (a != b) begin fails_o++; $display("P=%0d port %0d: payloads differ", P, k); end
    end
  endtask

  initial begin
    checks_o = 0; fails_o = 0; done = 0;
    in_valid = '0; in_dest = '0; in_data = '0;
    for (int k = 0; k < P; k++) ofs[k] = 0;
    wait (go);
    for (int c = 0; c < 400; c++) begin
      exp_t e;
      int mode;
      mode = c % 4;
      for (int i = 0; i < P; i++) begin
        in_valid[i] = (mode == 3) ? 1'b1 : ($urandom_range(3, 0) != 0);
        in_dest[i]  = (mode == 3) ? LG'(c % P) : (mode == 2 ? LG'($urandom_range(1, 0)) : LG'($urandom));
        in_data[i]  = W'($urandom);
      end
      model(e);
      h.push_front(e);
      #1;
      if (h.size() > LAT) compare(h[LAT]);
      @(posedge clk); #1;
    end
    checks_o++;
    if (nfull == 0) begin fails_o++; $display("no all-to-one batch"); end
    done = 1;
  end
endmodule
