// tb_replay_buffer: random pushes and pops (never beyond capacity), head and
// count compared with a queue model.
`timescale 1ns/1ps
module tb_replay_buffer;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, head_valid; uop_t push_uop, head_uop; logic [3:0] count;
  replay_buffer dut (.*);
  int checks = 0, failures = 0;
  uop_t q [$];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; push_uop = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (count !== 4'(q.size()) || head_valid !== (q.size() > 0) ||
          (q.size() > 0 && head_uop !== q[0])) begin
        failures++; if (failures < 10) $display("FAIL cycle %0d count %0d exp %0d", n, count, q.size());
      end
      pop  = ($urandom % 2) && q.size() > 0;
      push = ($urandom % 2) && (q.size() < 8 || pop);
      push_uop = uop_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_uop);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
