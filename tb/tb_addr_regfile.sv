// tb_addr_regfile: directed scenarios for the Addr register file: allocation
// on an invalid entry, hit and use bit, replacement of a valid but unused
// entry, no replacement of a used entry, background freeing after exactly
// FREE_PERIOD idle slow cycles, eviction pulses and the recent-change window;
// then a random phase on all ports, checked every cycle against a model.
`timescale 1ns/1ps
module tb_addr_regfile;
  localparam int FP = 30, G = 6;
  logic clk = 0, rst_n = 0, ce = 1;
  always #5 clk = ~clk;
  logic [3:0] lk_en, lk_hit; logic [3:0][2:0] lk_idx; logic [3:0][43:0] lk_upper;
  logic bc_en, bc_hit, bc_addr; logic [2:0] bc_idx; logic [43:0] bc_upper;
  logic nr_en, nr_valid; logic [2:0] nr_idx; logic [43:0] nr_upper;
  logic [2:0] peek_idx; logic peek_valid; logic [43:0] peek_upper;
  logic [7:0] evict, recent, valid_o;
  addr_regfile #(.FREE_PERIOD(FP), .GUARD(G)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  // base check at the next edge; returns bc_addr/bc_hit seen before it
  task automatic bcheck(int idx, logic [43:0] up, output bit addr, output bit hit);
    @(negedge clk); bc_en = 1; bc_idx = 3'(idx); bc_upper = up; #1;
    addr = bc_addr; hit = bc_hit;
    @(negedge clk); bc_en = 0;
  endtask
  bit a, h;

  // Random phase: reset, then drive every port at random against a
  // cycle-level model of the entries. Quiet stretches let entries age out.
  logic [43:0] m_val [8];
  bit  m_vld [8], m_use [8], m_ev [8];
  int  m_idle [8], m_grd [8];
  function automatic logic [43:0] pick_up();
    case ($urandom % 3) 0: return 44'h123; 1: return 44'h456; default: return 44'h789;
    endcase
  endfunction
  task automatic random_phase();
    int n_ev, n_free;
    n_ev = 0; n_free = 0;
    @(negedge clk); rst_n = 0; ce = 0;
    lk_en = 0; bc_en = 0; nr_en = 0;
    foreach (m_vld[i]) begin m_vld[i] = 0; m_use[i] = 0; m_ev[i] = 0; m_idle[i] = 0; m_grd[i] = 0; m_val[i] = 0; end
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit quiet, e_hit [4], e_bh, e_alloc, touch [8], alloc [8], free [8];
      int bi;
      @(negedge clk);
      quiet = (n % 200) >= 120;
      ce = n[0];
      for (int p = 0; p < 4; p++) begin
        lk_en[p] = !quiet && ($urandom % 3 == 0); lk_idx[p] = 3'($urandom % 4); lk_upper[p] = pick_up();
      end
      bc_en = !quiet && ($urandom % 3 == 0); bc_idx = 3'($urandom % 4); bc_upper = pick_up();
      nr_en = !quiet && ($urandom % 5 == 0); nr_idx = 3'($urandom % 4);
      peek_idx = 3'($urandom % 8);
      #1;
      // outputs before the edge
      for (int p = 0; p < 4; p++) begin
        e_hit[p] = m_vld[lk_idx[p]] && m_val[lk_idx[p]] == lk_upper[p];
        chk(lk_hit[p] == e_hit[p], $sformatf("rand %0d lk_hit %0d", n, p));
      end
      bi = bc_idx;
      e_bh = m_vld[bi] && m_val[bi] == bc_upper;
      e_alloc = bc_en && !e_bh && (!m_vld[bi] || !m_use[bi]);
      chk(bc_hit == e_bh && bc_addr == (bc_en && (e_bh || e_alloc)), $sformatf("rand %0d bc", n));
      chk(nr_valid == m_vld[nr_idx] && (!nr_valid || nr_upper == m_val[nr_idx]), $sformatf("rand %0d nr", n));
      chk(peek_valid == m_vld[peek_idx] && (!peek_valid || peek_upper == m_val[peek_idx]), $sformatf("rand %0d peek", n));
      for (int i = 0; i < 8; i++) begin
        chk(valid_o[i] == m_vld[i] && evict[i] == m_ev[i] && recent[i] == (m_grd[i] != 0),
            $sformatf("rand %0d entry %0d state", n, i));
      end
      // model update at the edge
      for (int i = 0; i < 8; i++) begin
        touch[i] = (nr_en && nr_idx == i) || (bc_en && e_bh && bi == i);
        for (int p = 0; p < 4; p++) if (lk_en[p] && e_hit[p] && lk_idx[p] == i) touch[i] = 1;
        alloc[i] = e_alloc && bi == i;
        free[i]  = !alloc[i] && !touch[i] && ce && m_vld[i] && m_use[i] && m_idle[i] >= FP - 1;
      end
      for (int i = 0; i < 8; i++) begin
        m_ev[i] = (alloc[i] && m_vld[i]) || free[i];
        n_ev += int'(m_ev[i]); n_free += int'(free[i]);
        if (alloc[i]) begin m_val[i] = bc_upper; m_vld[i] = 1; m_use[i] = 0; m_idle[i] = 0; end
        else if (free[i]) begin m_vld[i] = 0; m_use[i] = 0; m_idle[i] = 0; end
        else if (touch[i] && m_vld[i]) begin m_use[i] = 1; m_idle[i] = 0; end
        else if (ce && m_vld[i] && m_use[i]) m_idle[i]++;
        if (alloc[i] || free[i]) m_grd[i] = G;
        else if (m_grd[i] != 0) m_grd[i]--;
      end
    end
    lk_en = 0; bc_en = 0; nr_en = 0; ce = 1;
    chk(n_ev > 0 && n_free > 0, $sformatf("random phase saw %0d evictions, %0d frees", n_ev, n_free));
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    lk_en = 0; lk_idx = '0; lk_upper = '0; bc_en = 0; bc_idx = 0; bc_upper = 0;
    nr_en = 0; nr_idx = 0; peek_idx = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    chk(valid_o == 0, "reset valid");
    // allocate entry 3 with A
    bcheck(3, 44'hA, a, h);
    chk(a && !h, "alloc on invalid");
    chk(valid_o[3] && !evict[3], "entry 3 valid, no evict");
    chk(recent[3], "recent after alloc");
    // B replaces the still-unused entry
    bcheck(3, 44'hB, a, h);
    chk(a && !h, "replace unused");
    chk(evict[3], "evict pulse on replace");
    peek_idx = 3; #1 chk(peek_upper == 44'hB, "B stored");
    // hit with B sets the use bit; then C is refused
    bcheck(3, 44'hB, a, h);
    chk(a && h, "hit");
    bcheck(3, 44'hC, a, h);
    chk(!a && !h, "used entry not replaced");
    // classification lookup hit
    @(negedge clk); lk_idx[0] = 3; lk_upper[0] = 44'hB; lk_en[0] = 1; #1 chk(lk_hit[0], "lookup hit");
    lk_upper[0] = 44'hC; #1 chk(!lk_hit[0], "lookup miss"); lk_en[0] = 0;
    // fast read
    nr_idx = 3; #1 chk(nr_valid && nr_upper == 44'hB, "narrow read");
    repeat (G + 1) @(posedge clk);
    #1 chk(!recent[3], "recent window over");
    // background freeing: used entry 3 idle for FP slow cycles
    begin
      int n;
      @(negedge clk); nr_en = 1; nr_idx = 3;
      @(negedge clk); nr_en = 0;
      n = 0;
      while (valid_o[3] && n < 100) begin @(posedge clk); #1; n++; end
      chk(!valid_o[3], "freed");
      chk(n >= FP - 2 && n <= FP + 1, $sformatf("freed after %0d cycles", n));
      chk(evict[3], "evict pulse on free");
    end
    // an unused entry is never freed by the background process
    bcheck(5, 44'h55, a, h);
    repeat (3 * FP) @(posedge clk);
    chk(valid_o[5], "unused entry kept");
    // touching keeps a used entry alive
    bcheck(5, 44'h55, a, h);
    for (int i = 0; i < 3 * FP; i++) begin
      @(negedge clk); nr_en = (i % (FP / 2)) == 0; nr_idx = 5;
    end
    nr_en = 0; #1 chk(valid_o[5], "touched entry kept");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
