// tb_predictor_sizes: the cluster predictor at 1K, 2K, 4K, 8K and 16K
// entries, fed the same synthetic instruction stream. Each cycle one
// instruction is looked up at fetch; its outcome (did it fit the narrow
// cluster) is written back three cycles later. Every prediction is checked
// against a model of the tag-less table, and the fraction of correct
// predictions per size is printed.
//
// The stream: 3000 static instructions at random word addresses in a 256KB
// code region, visited in random order with a skew towards a hot subset.
// 70% of them always fit the narrow cluster, 25% never do and 5% change at
// random. Smaller tables alias more of them onto the same entry, so
// accuracy grows with size.
`timescale 1ns/1ps
module tb_predictor_sizes;
  localparam int NSZ  = 5;
  localparam int SIZES [NSZ] = '{1024, 2048, 4096, 8192, 16384};
  localparam int NPC  = 3000;
  localparam int NACC = 60000;
  localparam int WB_DELAY = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int correct [NSZ];

  logic [63:0] pcs   [NPC];
  int          kind  [NPC];   // 0 narrow, 1 wide, 2 random

  logic        rd_en;
  logic [63:0] rd_pc;
  logic        upd_valid, upd_narrow;
  logic [63:0] upd_pc;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NSZ; s++) begin : g_sz
    localparam int N  = SIZES[s];
    localparam int IW = $clog2(N);
    logic rd_narrow;

    cluster_predictor #(.ENTRIES(N), .NUPD(1)) dut (
      .clk, .rst_n, .rd_en, .rd_pc, .rd_narrow,
      .upd_valid (upd_valid), .upd_pc (upd_pc), .upd_narrow (upd_narrow));

    bit mt [N];
    logic [63:0] look_pc;
    bit          look_v, look_o;
    logic [63:0] u_pc;
    bit          u_v, u_n;

    initial begin
      foreach (mt[i]) mt[i] = 0;
      correct[s] = 0;
      look_v = 0; u_v = 0;
    end

    // Sample what the DUT sees at the rising edge, then at the falling edge
    // check the registered prediction and apply the update to the model.
    always @(posedge clk) begin
      look_pc <= rd_pc; look_v <= rst_n && rd_en; look_o <= out_d[0];
      u_pc <= upd_pc; u_v <= rst_n && upd_valid; u_n <= upd_narrow;
    end
    always @(negedge clk) begin
      if (look_v) begin
        checks++;
        if (rd_narrow !== mt[look_pc[2 +: IW]]) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d pc=%h got %b", N, look_pc, rd_narrow);
        end
        if (rd_narrow === look_o) correct[s]++;
      end
      if (u_v) mt[u_pc[2 +: IW]] = u_n;
    end
  end

  // Outcome of one dynamic instance.
  function automatic logic outcome(int k);
    case (kind[k])
      0:       return 1'b1;
      1:       return 1'b0;
      default: return 1'($urandom);
    endcase
  endfunction

  int cur [WB_DELAY+1];
  logic out_d [WB_DELAY+1];

  initial begin
    for (int k = 0; k < NPC; k++) begin
      int r;
      pcs[k] = 64'h0001_2000_0000 + 64'($urandom % 65536) * 4;
      r = $urandom % 100;
      kind[k] = (r < 70) ? 0 : (r < 95) ? 1 : 2;
    end
    rd_en = 0; rd_pc = 0; upd_valid = 0; upd_pc = 0; upd_narrow = 0;
    foreach (cur[i]) begin cur[i] = -1; out_d[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NACC + WB_DELAY + 2; n++) begin
      @(posedge clk); #1;
      // Shift the write-back pipe: the instance fetched WB_DELAY cycles ago
      // writes back now.
      for (int d = WB_DELAY; d > 0; d--) begin cur[d] = cur[d-1]; out_d[d] = out_d[d-1]; end
      upd_valid  = cur[WB_DELAY] >= 0;
      upd_pc     = upd_valid ? pcs[cur[WB_DELAY]] : '0;
      upd_narrow = out_d[WB_DELAY];
      if (n < NACC) begin
        int k;
        k = ($urandom % 4 != 0) ? $urandom % (NPC / 5) : $urandom % NPC;
        cur[0] = k; out_d[0] = outcome(k);
        rd_en = 1; rd_pc = pcs[k];
      end else begin
        cur[0] = -1; rd_en = 0;
      end
    end
    upd_valid = 0;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NSZ; s++)
      $display("predictor %0d entries: %0d of %0d predictions correct (%0d.%0d%%)", SIZES[s],
               correct[s], NACC, correct[s] * 100 / NACC, (correct[s] * 1000 / NACC) % 10);
    for (int s = 1; s < NSZ; s++)
      if (correct[s] + NACC / 200 < correct[s-1]) begin
        failures++; $display("FAIL accuracy falls from %0d to %0d entries", SIZES[s-1], SIZES[s]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
