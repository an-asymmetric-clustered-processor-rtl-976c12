// tb_icc_pipe: random valid/data stream; every item must appear exactly LAT
// cycles later, and nothing else.
`timescale 1ns/1ps
module tb_icc_pipe;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid; logic [7:0] in_data, out_data;
  icc_pipe #(.T(logic [7:0]), .LAT(LAT)) dut (.*);
  int checks = 0, failures = 0;
  bit hv [$]; logic [7:0] hd [$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; in_data = 0;
    repeat (LAT) begin hv.push_back(0); hd.push_back(0); end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== hv[0] || (hv[0] && out_data !== hd[0])) begin
        failures++; if (failures < 10) $display("FAIL cycle %0d", n);
      end
      void'(hv.pop_front()); void'(hd.pop_front());
      in_valid = $urandom % 2; in_data = 8'($urandom);
      hv.push_back(in_valid); hd.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
