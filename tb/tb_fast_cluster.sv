// tb_fast_cluster: the narrow cluster pipeline with testbench models of the
// Simple file, the descriptors, the Addr file and the level-0 TLB.
// Random instructions are sent one at a time; for each, exactly one outcome
// (result, memory request or replay) must appear, exactly two cycles after
// the cycle it was inserted (ISSUE, RF READ, EXE), and must match a 64b
// reference of the operation. Also checks that a source that is not
// available, or hold, keeps the instruction in the queue.
`timescale 1ns/1ps
module tb_fast_cluster;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic disp_valid, iq_full, hold, ar_en, ar_valid, tlb_hit;
  uop_t disp_uop, rep_uop;
  logic [NPREG-1:0] avail;
  tag_t [1:0] rf_tag; logic [1:0][NW-1:0] rf_data; vtype_e [1:0] rf_vt; logic [1:0][PTR_W-1:0] rf_ptr;
  logic [PTR_W-1:0] ar_idx; logic [UPPER_W-1:0] ar_upper; logic [NADDR-1:0] addr_recent;
  logic [XLEN-1:0] tlb_va; logic [PA_W-1:0] tlb_pa;
  logic res_valid, mem_valid, rep_valid, done_valid, pupd_valid, pupd_narrow, ev_addr_ovf;
  tag_t res_tag; logic [NW-1:0] res_val; memreq_t mem_req; logic [ID_W-1:0] done_id; logic [XLEN-1:0] pupd_pc;
  fast_cluster dut (.*);

  logic [NW-1:0] sr [NPREG]; vtype_e vt [NPREG];
  logic [UPPER_W-1:0] au [NADDR]; bit av [NADDR];
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      rf_data[r] = sr[rf_tag[r]]; rf_vt[r] = vt[rf_tag[r]]; rf_ptr[r] = sr[rf_tag[r]][19:17];
    end
    ar_valid = av[ar_idx]; ar_upper = au[ar_idx];
    tlb_hit  = tlb_va[16];                      // model: half the pages are present
    tlb_pa   = {tlb_va[43:15] ^ 29'h155, tlb_va[14:0]};
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    disp_valid = 0; disp_uop = '0; hold = 0; avail = '1; addr_recent = '0;
    for (int i = 0; i < NPREG; i++) begin sr[i] = 20'($urandom); vt[i] = VT_SIMPLE; end
    for (int i = 0; i < NADDR; i++) begin au[i] = {$urandom, $urandom}; av[i] = (i != 6); end
    addr_recent[5] = 1'b1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      uop_t u;
      logic [63:0] A, B, R, I;
      bit exp_rep, exp_mem, waitsrc, mem;
      int lat;
      u = '0;
      u.id = ID_W'(n); u.pc = 64'(n) * 4;
      u.op = op_e'($urandom % 12);
      mem = is_mem(u.op);
      u.s1_v = 1; u.s1 = tag_t'($urandom);
      u.s2_v = (u.op == OP_ST) || (!mem && u.op != OP_ADDI);
      u.s2 = tag_t'($urandom);
      u.dst_v = (u.op != OP_ST); u.dst = tag_t'($urandom);
      u.imm = 16'($urandom);
      // operand types and values
      vt[u.s1] = vtype_e'(($urandom % 4 == 0) ? 1 : (mem ? (($urandom % 3 == 0) ? 0 : 2) : 0));
      sr[u.s1] = ($urandom % 2) ? 20'($urandom) : 20'($signed(8'($urandom)));
      if (u.s2 != u.s1) begin
        vt[u.s2] = vtype_e'(($urandom % 5 == 0) ? 1 : 0);
        sr[u.s2] = (u.op inside {OP_SLL, OP_SRL, OP_SRA}) ? 20'($urandom % 24) : 20'($urandom);
      end
      waitsrc = (n % 10 == 0);
      // reference
      A = (vt[u.s1] == VT_ADDR) ? {au[sr[u.s1][19:17]], sr[u.s1]} : sext_nw(sr[u.s1]);
      B = u.s2_v ? sext_nw(sr[u.s2]) : '0;
      I = XLEN'($signed(u.imm));
      case (u.op)
        OP_ADD: R = A + B;  OP_SUB: R = A - B;  OP_AND: R = A & B;
        OP_OR:  R = A | B;  OP_XOR: R = A ^ B;  OP_SLL: R = A << B[5:0];
        OP_SRL: R = A >> B[5:0];  OP_SRA: R = $signed(A) >>> B[5:0];
        OP_MUL: R = A * B;  default: R = A + I;
      endcase
      if (mem) begin
        exp_rep = vt[u.s1] == VT_LONG || (u.s2_v && vt[u.s2] != VT_SIMPLE);
        if (!exp_rep && vt[u.s1] == VT_ADDR)
          exp_rep = !av[sr[u.s1][19:17]] || addr_recent[sr[u.s1][19:17]] || R[63:20] != A[63:20];
        else if (!exp_rep)
          exp_rep = !fits_narrow(R);
      end else
        exp_rep = u.op == OP_MUL || vt[u.s1] != VT_SIMPLE || (u.s2_v && vt[u.s2] != VT_SIMPLE) || !fits_narrow(R);
      exp_mem = mem && !exp_rep;
      // dispatch
      @(negedge clk);
      if (waitsrc) avail[u.s1] = 1'b0;
      if (n % 7 == 3) hold = 1'b1;
      disp_valid = 1; disp_uop = u;
      @(negedge clk);
      disp_valid = 0;
      if (waitsrc || hold) begin
        repeat (4) begin
          @(negedge clk);
          chk(!res_valid && !mem_valid && !rep_valid, "issued while waiting");
        end
        avail[u.s1] = 1'b1; hold = 1'b0;   // selected in this cycle
      end
      // now: ISSUE in this cycle; outcome two cycles later
      lat = 0;
      while (!(res_valid || mem_valid || rep_valid) && lat < 6) begin @(negedge clk); lat++; end
      chk(lat == 2, $sformatf("latency %0d (n=%0d)", lat, n));
      chk(rep_valid == exp_rep, $sformatf("n=%0d %s replay %b exp %b", n, u.op.name(), rep_valid, exp_rep));
      chk(mem_valid == exp_mem, $sformatf("n=%0d mem", n));
      chk(pupd_valid && pupd_narrow == !exp_rep && pupd_pc == u.pc, "predictor update");
      if (rep_valid) chk(rep_uop == u, "replay payload");
      if (res_valid) chk(res_tag == u.dst && res_val == R[19:0], $sformatf("n=%0d %s result %h exp %h", n, u.op.name(), res_val, R));
      if (mem_valid) begin
        chk(mem_req.va == R && mem_req.is_st == (u.op == OP_ST) && mem_req.id == u.id,
            $sformatf("n=%0d va %h exp %h", n, mem_req.va, R));
        if (u.op == OP_ST) chk(mem_req.data == B, "store data");
        chk(mem_req.pa_v == (vt[u.s1] == VT_ADDR && R[16]), "pa valid");
        if (mem_req.pa_v) chk(mem_req.pa == {R[43:15] ^ 29'h155, R[14:0]}, "pa");
      end
      chk(done_valid == ((res_valid || mem_valid) && u.op != OP_LD), "done");
      @(negedge clk);
      chk(!res_valid && !mem_valid && !rep_valid, "single outcome");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
