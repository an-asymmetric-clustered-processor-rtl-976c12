// tb_reg_descriptor: random descriptor writes, reads and Addr-entry
// demotions against an array model; checks reset to Simple.
`timescale 1ns/1ps
module tb_reg_descriptor;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tag_t [3:0] rd_tag; vtype_e [3:0] rd_vt; logic [3:0][PTR_W-1:0] rd_ptr;
  logic [5:0] wr_en; tag_t [5:0] wr_tag; vtype_e [5:0] wr_vt; logic [5:0][PTR_W-1:0] wr_ptr;
  logic [NADDR-1:0] demote_mask;
  reg_descriptor dut (.*);
  int checks = 0, failures = 0;
  vtype_e mvt [NPREG]; logic [PTR_W-1:0] mptr [NPREG];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_en = 0; wr_tag = '0; wr_vt = '{default: VT_SIMPLE}; wr_ptr = '0; demote_mask = 0; rd_tag = '0;
    for (int i = 0; i < NPREG; i++) begin mvt[i] = VT_SIMPLE; mptr[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        rd_tag[r] = tag_t'($urandom);
        #0;
      end
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rd_vt[r] !== mvt[rd_tag[r]] || (mvt[rd_tag[r]] == VT_ADDR && rd_ptr[r] !== mptr[rd_tag[r]])) begin
          failures++; if (failures < 10) $display("FAIL tag %0d", rd_tag[r]);
        end
      end
      for (int w = 0; w < 6; w++) begin
        wr_en[w]  = ($urandom % 4) == 0;
        wr_tag[w] = tag_t'($urandom % 32);      // collisions on purpose
        wr_vt[w]  = vtype_e'($urandom % 3);
        wr_ptr[w] = PTR_W'($urandom);
      end
      demote_mask = ($urandom % 4 == 0) ? NADDR'($urandom) : '0;
      for (int w = 0; w < 6; w++)
        if (wr_en[w]) begin mvt[wr_tag[w]] = wr_vt[w]; mptr[wr_tag[w]] = wr_ptr[w]; end
      for (int i = 0; i < NPREG; i++)
        if (mvt[i] == VT_ADDR && demote_mask[mptr[i]]) mvt[i] = VT_LONG;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
