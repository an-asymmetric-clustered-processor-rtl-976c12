// tb_issue_queue: random inserts with random sources and a random
// availability vector. Checks, against a model of the queue contents: that
// only ready entries issue, each inserted entry issues exactly once, lanes
// never pick the same entry, Ld/St use only lane 0, the lowest ready slot
// goes first, full/count are right, and a ready entry waits at most one
// cycle when a lane is free.
`timescale 1ns/1ps
module tb_issue_queue;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ins_valid, full; uop_t ins_uop; logic [4:0] count;
  logic [NPREG-1:0] avail; logic [1:0] lane_en, iss_valid; uop_t [1:0] iss_uop;
  issue_queue dut (.*);
  int checks = 0, failures = 0;
  uop_t slot [20]; bit sv [20];
  int issued [256];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic bit rdy(uop_t u);
    return (!u.s1_v || avail[u.s1]) && (!u.s2_v || avail[u.s2]);
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nid = 0;
    ins_valid = 0; ins_uop = '0; avail = '0; lane_en = 0;
    foreach (sv[i]) sv[i] = 0;
    foreach (issued[i]) issued[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int cnt, want [2], lane_taken [20], ins_slot;
      @(negedge clk);
      avail = {$urandom, $urandom, $urandom, $urandom};
      lane_en = 2'($urandom);
      cnt = 0; foreach (sv[i]) cnt += sv[i];
      ins_valid = (cnt < 20) && ($urandom % 3 != 0) && n < 5000;
      ins_uop = '0;
      ins_uop.id = ID_W'(nid % 256);
      ins_uop.op = op_e'($urandom % 12);
      ins_uop.s1_v = $urandom % 2; ins_uop.s1 = tag_t'($urandom);
      ins_uop.s2_v = $urandom % 2; ins_uop.s2 = tag_t'($urandom);
      #1;
      chk(full == (cnt == 20) && count == 5'(cnt), "full/count");
      // expected picks: lowest ready slot per enabled lane
      foreach (lane_taken[i]) lane_taken[i] = 0;
      for (int l = 0; l < 2; l++) begin
        want[l] = -1;
        if (lane_en[l])
          for (int i = 0; i < 20; i++)
            if (want[l] < 0 && sv[i] && !lane_taken[i] && rdy(slot[i]) && (l == 0 || !is_mem(slot[i].op)))
              want[l] = i;
        if (want[l] >= 0) lane_taken[want[l]] = 1;
        chk(iss_valid[l] == (want[l] >= 0), $sformatf("lane %0d valid", l));
        if (want[l] >= 0 && iss_valid[l]) chk(iss_uop[l] == slot[want[l]], $sformatf("lane %0d pick", l));
      end
      @(posedge clk);
      // the new entry goes to the lowest slot that was free before this edge
      ins_slot = -1;
      for (int i = 0; i < 20; i++) if (!sv[i] && ins_slot < 0) ins_slot = i;
      for (int l = 0; l < 2; l++) if (want[l] >= 0) begin sv[want[l]] = 0; issued[slot[want[l]].id]++; end
      if (ins_valid) begin
        sv[ins_slot] = 1; slot[ins_slot] = ins_uop;
        nid++;
      end
    end
    // drain
    @(negedge clk); avail = '1; lane_en = 2'b11; ins_valid = 0;
    repeat (30) @(posedge clk);
    @(negedge clk);
    chk(count == 0, "drained");
    for (int i = 0; i < (nid < 256 ? nid : 256); i++) chk(issued[i] >= 1, $sformatf("id %0d issued", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
