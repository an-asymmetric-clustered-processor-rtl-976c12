// tb_simple_regfile: random multi-port writes and reads of the 20b file
// against an array model (later port wins), including the reset value.
`timescale 1ns/1ps
module tb_simple_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0][6:0] rd_tag; logic [1:0][19:0] rd_data;
  logic [4:0] wr_en; logic [4:0][6:0] wr_tag; logic [4:0][19:0] wr_data;
  simple_regfile dut (.*);
  int checks = 0, failures = 0;
  logic [19:0] m [128];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_en = 0; wr_tag = '0; wr_data = '0; rd_tag = '0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++) rd_tag[r] = 7'($urandom);
      #1;
      for (int r = 0; r < 2; r++) begin
        checks++;
        if (rd_data[r] !== m[rd_tag[r]]) begin failures++; if (failures < 10) $display("FAIL %0d", rd_tag[r]); end
      end
      for (int w = 0; w < 5; w++) begin
        wr_en[w] = ($urandom % 3) == 0; wr_tag[w] = 7'($urandom % 40); wr_data[w] = 20'($urandom);
      end
      for (int w = 0; w < 5; w++) if (wr_en[w]) m[wr_tag[w]] = wr_data[w];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
