// tb_l0_tlb: fills, hits, page-tag misses and invalidation of the level-0
// TLB, against a model of 8 direct-mapped entries.
`timescale 1ns/1ps
module tb_l0_tlb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] lk_va, fill_va; logic lk_hit, fill_en; logic [43:0] lk_pa;
  logic [3:0] lk_attr, fill_attr; logic [28:0] fill_ppn; logic [7:0] inv;
  l0_tlb dut (.*);
  int checks = 0, failures = 0;
  bit mv [8]; logic [1:0] mt [8]; logic [28:0] mp [8];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    fill_en = 0; fill_va = 0; fill_ppn = 0; fill_attr = 0; inv = 0; lk_va = 0;
    foreach (mv[i]) mv[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int i;
      @(negedge clk);
      lk_va = {$urandom, $urandom} & 64'hFFFF_FFFF_FFF9_FFFF | (64'($urandom % 2) << 17);
      #1;
      i = lk_va[19:17];
      checks++;
      if (lk_hit !== (mv[i] && mt[i] == lk_va[16:15]) ||
          (lk_hit && lk_pa !== {mp[i], lk_va[14:0]})) begin
        failures++; if (failures < 10) $display("FAIL %h hit %b", lk_va, lk_hit);
      end
      fill_en = ($urandom % 3) == 0;
      fill_va = {$urandom, $urandom} & 64'hFFFF_FFFF_FFF9_FFFF | (64'($urandom % 2) << 17);
      fill_ppn = 29'($urandom); fill_attr = 4'($urandom);
      inv = ($urandom % 5 == 0) ? 8'($urandom) : '0;
      if (fill_en) begin
        i = fill_va[19:17]; mv[i] = 1; mt[i] = fill_va[16:15]; mp[i] = fill_ppn;
      end
      for (int k = 0; k < 8; k++) if (inv[k]) mv[k] = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
