// tb_slow_cluster: the wide cluster pipeline with a testbench model of the
// Long file and of the Addr-file base check. The clock enable ce is high
// every second cycle. Single instructions (some through the replay port)
// must produce their outcome in the third enabled cycle after insertion
// (ISSUE, RF READ, EXE), matching a 64b reference; pairs of ALU ops released
// together must issue on both lanes in the same slow cycle; a replay whose
// source is not available must wait while the queue goes on issuing.
`timescale 1ns/1ps
module tb_slow_cluster;
  import acp_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  always #5 clk = ~clk;
  logic disp_valid, iq_full, rep_in_valid, mem_valid, bc_en, bc_addr, ev_replay;
  uop_t disp_uop, rep_in_uop;
  logic [NPREG-1:0] avail;
  logic [3:0] rb_count;
  tag_t [3:0] rf_tag; logic [3:0][XLEN-1:0] rf_data;
  logic [1:0] wb_valid, done_valid, pupd_valid, pupd_narrow;
  tag_t [1:0] wb_tag; logic [1:0][XLEN-1:0] wb_val, pupd_pc; logic [1:0][ID_W-1:0] done_id;
  memreq_t mem_req; tag_t bc_tag; logic [XLEN-1:0] bc_base;
  slow_cluster dut (.*);

  logic [XLEN-1:0] lr [NPREG];
  always_comb begin
    for (int r = 0; r < 4; r++) rf_data[r] = lr[rf_tag[r]];
    bc_addr = bc_en && bc_base[3];             // model answer of the Addr file
  end
  always @(posedge clk or negedge rst_n) if (!rst_n) ce <= 0; else ce <= ~ce;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] refop(uop_t u);
    logic [63:0] A = lr[u.s1], B = u.s2_v ? lr[u.s2] : '0;
    case (u.op)
      OP_ADD: return A + B;  OP_SUB: return A - B;  OP_AND: return A & B;
      OP_OR:  return A | B;  OP_XOR: return A ^ B;  OP_SLL: return A << B[5:0];
      OP_SRL: return A >> B[5:0];  OP_SRA: return $signed(A) >>> B[5:0];
      OP_MUL: return A * B;  default: return A + XLEN'($signed(u.imm));
    endcase
  endfunction

  function automatic uop_t mk(int n, bit alu_only);
    uop_t u = '0;
    u.id = ID_W'(n); u.pc = 64'h4000 + 64'(n) * 4;
    u.op = alu_only ? op_e'($urandom % 10) : op_e'($urandom % 12);
    u.s1_v = 1; u.s1 = tag_t'($urandom);
    u.s2_v = (u.op == OP_ST) || (!is_mem(u.op) && u.op != OP_ADDI);
    u.s2 = tag_t'($urandom);
    u.dst_v = (u.op != OP_ST); u.dst = tag_t'($urandom);
    u.imm = 16'($urandom);
    lr[u.s1] = ($urandom % 2) ? {$urandom, $urandom} : 64'($signed(12'($urandom)));
    if (u.s2 != u.s1) lr[u.s2] = ($urandom % 2) ? {$urandom, $urandom} : 64'($signed(10'($urandom)));
    return u;
  endfunction

  task automatic check_out(uop_t u, int l, string tag);
    logic [63:0] R = refop(u), A = lr[u.s1], B = u.s2_v ? lr[u.s2] : '0;
    bit mem = is_mem(u.op), en;
    if (mem) begin
      chk(l == 0 && mem_valid && mem_req.va == R && mem_req.is_st == (u.op == OP_ST) && !mem_req.pa_v,
          $sformatf("%s mem va %h exp %h", tag, mem_req.va, R));
      if (u.op == OP_ST) chk(mem_req.data == B, "store data");
      chk(bc_en == !fits_narrow(A) && bc_base == A && bc_tag == u.s1, "base check");
      en = fits_narrow(A) || (!fits_narrow(A) && A[3]);
    end else begin
      chk(wb_valid[l] && wb_tag[l] == u.dst && wb_val[l] == R,
          $sformatf("%s %s lane %0d result %h exp %h", tag, u.op.name(), l, wb_val[l], R));
      en = u.op != OP_MUL && fits_narrow(R) && fits_narrow(A) && (!u.s2_v || fits_narrow(B));
    end
    chk(pupd_valid[l] && pupd_pc[l] == u.pc && pupd_narrow[l] == en, $sformatf("%s predictor update", tag));
    chk(done_valid[l] == (u.op != OP_LD) && (u.op == OP_LD || done_id[l] == u.id), "done");
  endtask

  // wait for the first enabled cycle with an outcome; returns enabled cycles waited
  task automatic wait_out(output int k);
    k = 0;
    do begin
      @(negedge clk);
      if (ce) k++;
    end while (!(ce && (wb_valid != 0 || mem_valid)) && k < 8);
  endtask

  initial begin
    int k;
    disp_valid = 0; disp_uop = '0; rep_in_valid = 0; rep_in_uop = '0; avail = '1;
    for (int i = 0; i < NPREG; i++) lr[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;
    // single instructions, every fourth one through the replay port
    for (int n = 0; n < 1500; n++) begin
      uop_t u = mk(n, 0);
      bit rep = (n % 4 == 2);
      @(negedge clk);
      if (rep) begin rep_in_valid = 1; rep_in_uop = u; end
      else     begin disp_valid = 1; disp_uop = u; end
      @(negedge clk);
      rep_in_valid = 0; disp_valid = 0;
      wait_out(k);
      chk(k == 3, $sformatf("n=%0d latency %0d enabled cycles", n, k));
      check_out(u, 0, $sformatf("n=%0d", n));
      repeat (3) @(negedge clk);
    end
    // pairs released together issue on both lanes
    for (int n = 0; n < 300; n++) begin
      uop_t u0 = mk(2000 + 2 * n, 1), u1 = mk(2001 + 2 * n, 1);
      u0.s1 = u1.s1;  // common source gates both
      @(negedge clk); avail[u0.s1] = 0; disp_valid = 1; disp_uop = u0;
      @(negedge clk); disp_uop = u1;
      @(negedge clk); disp_valid = 0;
      @(negedge clk); avail[u0.s1] = 1;
      wait_out(k);
      chk(wb_valid == 2'b11, $sformatf("pair %0d on both lanes", n));
      check_out(u0, 0, "pair lane0");
      check_out(u1, 1, "pair lane1");
      repeat (3) @(negedge clk);
    end
    // a replay waiting for its source does not block the queue
    begin
      uop_t r = mk(3000, 1), q = mk(3001, 1);
      bit seen_q = 0, seen_r = 0;
      @(negedge clk); avail[r.s1] = 0; rep_in_valid = 1; rep_in_uop = r;
      @(negedge clk); rep_in_valid = 0; disp_valid = 1; disp_uop = q;
      @(negedge clk); disp_valid = 0;
      repeat (12) begin
        @(negedge clk);
        if (ce && wb_valid[0] && wb_tag[0] == q.dst) seen_q = 1;
        if (ce && |wb_valid && wb_tag[0] == r.dst && wb_valid[0]) seen_r = 1;
      end
      chk(seen_q && !seen_r && rb_count == 1, "queue issues around a waiting replay");
      avail[r.s1] = 1;
      repeat (10) begin
        @(negedge clk);
        if (ce && wb_valid[0] && wb_tag[0] == r.dst) seen_r = 1;
      end
      chk(seen_r && rb_count == 0, "replay issued once its source arrived");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
