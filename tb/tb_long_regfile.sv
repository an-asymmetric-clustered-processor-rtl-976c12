// tb_long_regfile: random wide, narrow (sign-extended) and load writes and
// four read ports of the 64b file against an array model.
`timescale 1ns/1ps
module tb_long_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0][6:0] rd_tag; logic [3:0][63:0] rd_data;
  logic [1:0] ww_en; logic [1:0][6:0] ww_tag; logic [1:0][63:0] ww_data;
  logic [0:0] wn_en; logic [0:0][6:0] wn_tag; logic [0:0][19:0] wn_data;
  logic [1:0] wl_en; logic [1:0][6:0] wl_tag; logic [1:0][63:0] wl_data;
  long_regfile dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] m [128];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ww_en = 0; wn_en = 0; wl_en = 0; ww_tag = '0; wn_tag = '0; wl_tag = '0;
    ww_data = '0; wn_data = '0; wl_data = '0; rd_tag = '0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++) rd_tag[r] = 7'($urandom);
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rd_data[r] !== m[rd_tag[r]]) begin failures++; if (failures < 10) $display("FAIL %0d %h %h", rd_tag[r], rd_data[r], m[rd_tag[r]]); end
      end
      for (int w = 0; w < 2; w++) begin
        ww_en[w] = ($urandom % 3) == 0; ww_tag[w] = 7'($urandom % 40); ww_data[w] = {$urandom, $urandom};
        wl_en[w] = ($urandom % 3) == 0; wl_tag[w] = 7'($urandom % 40); wl_data[w] = {$urandom, $urandom};
      end
      wn_en[0] = ($urandom % 2) == 0; wn_tag[0] = 7'($urandom % 40); wn_data[0] = 20'($urandom);
      for (int w = 0; w < 2; w++) if (ww_en[w]) m[ww_tag[w]] = ww_data[w];
      if (wn_en[0]) m[wn_tag[0]] = {{44{wn_data[0][19]}}, wn_data[0]};
      for (int w = 0; w < 2; w++) if (wl_en[w]) m[wl_tag[w]] = wl_data[w];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
