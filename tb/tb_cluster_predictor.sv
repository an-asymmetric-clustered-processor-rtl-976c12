// tb_cluster_predictor: random lookups and write-back updates of the
// steering predictor, compared with a bit-array model. Checks the reset
// value (wide), the one-cycle read latency and update priority.
`timescale 1ns/1ps
module tb_cluster_predictor;
  localparam int ENTRIES = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, rd_narrow;
  logic [63:0] rd_pc;
  logic [2:0] upd_valid, upd_narrow;
  logic [2:0][63:0] upd_pc;
  cluster_predictor dut (.*);

  int checks = 0, failures = 0;
  bit model [ENTRIES];
  bit exp_q; bit exp_v;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; rd_pc = 0; upd_valid = 0; upd_narrow = 0; upd_pc = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rd_narrow !== exp_q) begin failures++; if (failures < 10) $display("FAIL read %0d", n); end
      end
      rd_en = ($urandom % 2) == 0;
      rd_pc = {$urandom, $urandom} & 64'h0000_0000_0000_7FFC;   // aliasing between PCs 16KB apart
      for (int u = 0; u < 3; u++) begin
        upd_valid[u]  = ($urandom % 3) == 0;
        upd_pc[u]     = {$urandom, $urandom} & 64'h0000_0000_0000_0FFC;
        upd_narrow[u] = $urandom % 2;
      end
      // registered read sees the table before this edge's updates
      exp_v = rd_en;
      if (rd_en) exp_q = model[(rd_pc >> 2) % ENTRIES];
      for (int u = 0; u < 3; u++)
        if (upd_valid[u]) model[(upd_pc[u] >> 2) % ENTRIES] = upd_narrow[u];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
