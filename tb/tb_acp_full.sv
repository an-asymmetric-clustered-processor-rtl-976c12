// tb_acp_full: the end-to-end test of tb_asym_cluster_core with the core at
// its default parameters (4K-entry predictor, 20-entry queues, 2-slow-cycle
// inter-cluster latency, 256-cycle Addr freeing period).
//
// A small looping program (pointer set-up, then a body of loads, stores and
// ALU ops with a mix of narrow and 64b values, a pointer near a 20b boundary
// and two pointers that compete for one Addr entry) is renamed and
// dispatched by the testbench, which also models the front end, the data
// cache (fixed latency, two return ports) and the level-1 TLB (a fixed
// translation function that fills the level-0 TLB). A reference model
// executes the program in order at dispatch and every memory request is
// checked against it (address, store data, and the physical address when
// the level-0 TLB translated it). The program runs in chunks; after each
// chunk the testbench waits for every instruction to complete, then checks
// every architectural register in the Long file, its Simple copy and, for
// Addr registers, the Addr entry it points to, and frees the physical
// registers no longer mapped. Each mechanism of the design must occur at
// least once.
`timescale 1ns/1ps
module tb_acp_full;
  import acp_pkg::*;

  localparam int FREE_P  = 256;   // the core's default background-freeing period
  localparam int N_CHUNK = 10;
  localparam int N_ARCH  = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic slow_ce, fetch_valid, fetch_pred_narrow, disp_valid, disp_pred_narrow, disp_ready;
  logic [XLEN-1:0] fetch_pc;
  uop_t disp_uop;
  logic nmem_valid, wmem_valid;
  memreq_t nmem_req, wmem_req;
  logic [1:0] ld_valid;
  tag_t [1:0] ld_tag;
  logic [1:0][XLEN-1:0] ld_data;
  logic tlb_fill_valid;
  logic [XLEN-1:0] tlb_fill_va;
  logic [PA_W-16:0] tlb_fill_ppn;
  logic [ATTR_W-1:0] tlb_fill_attr;
  logic [2:0] done_valid;
  logic [2:0][ID_W-1:0] done_id;
  acp_events_t ev;

  asym_cluster_core dut (.*);

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ memory model
  function automatic logic [XLEN-1:0] mem_val(logic [XLEN-1:0] a);
    logic [XLEN-1:0] h;
    h = a * 64'h9E3779B97F4A7C15;
    h = h ^ (h >> 29);
    if (h[3:2] != 2'b00) return XLEN'($signed(h[17:0]));   // mostly narrow values
    return h;
  endfunction
  function automatic logic [PA_W-16:0] xlate(logic [XLEN-1:0] va);
    return (PA_W-15)'(va[XLEN-1:15] ^ 49'h0_1357_9BDF);
  endfunction

  // ------------------------------------------------------------ program
  typedef struct { op_e op; int d, a, b; logic [15:0] imm; } ins_t;
  ins_t prog[$];
  int   body_start;
  function automatic ins_t I(op_e op, int d, int a, int b, int imm);
    ins_t x; x.op = op; x.d = d; x.a = a; x.b = b; x.imm = 16'(imm); return x;
  endfunction

  initial begin
    // prologue: r2 = 32, r4 = 16; r1 = load pointer (PTR 2), r5 = store
    // pointer (PTR 5), r6 = pointer just below a 20b boundary (PTR 7),
    // r7 = pointer sharing PTR 2 with r1 but with other upper bits
    prog.push_back(I(OP_ADDI, 2, 0, -1, 32));
    prog.push_back(I(OP_ADDI, 4, 0, -1, 16));
    prog.push_back(I(OP_ADDI, 1, 0, -1, 16'h1234));
    prog.push_back(I(OP_SLL,  1, 1, 2, 0));
    prog.push_back(I(OP_ADDI, 3, 0, -1, 5));
    prog.push_back(I(OP_SLL,  3, 3, 4, 0));
    prog.push_back(I(OP_OR,   1, 1, 3, 0));          // 0x1234_0005_0000
    prog.push_back(I(OP_ADDI, 5, 0, -1, 16'h5678));
    prog.push_back(I(OP_SLL,  5, 5, 2, 0));
    prog.push_back(I(OP_ADDI, 3, 0, -1, 16'h000A));
    prog.push_back(I(OP_SLL,  3, 3, 4, 0));
    prog.push_back(I(OP_OR,   5, 5, 3, 0));          // 0x5678_000A_0000
    prog.push_back(I(OP_ADDI, 6, 1, -1, 16'h7FF0));
    prog.push_back(I(OP_ADDI, 3, 0, -1, 16'h000A));
    prog.push_back(I(OP_SLL,  3, 3, 4, 0));
    prog.push_back(I(OP_ADD,  6, 6, 3, 0));
    prog.push_back(I(OP_ADDI, 6, 6, -1, 16'h6000));  // 0x1234_000F_DFF0
    prog.push_back(I(OP_ADDI, 7, 0, -1, 16'h0999));
    prog.push_back(I(OP_SLL,  7, 7, 2, 0));
    prog.push_back(I(OP_ADDI, 3, 0, -1, 5));
    prog.push_back(I(OP_SLL,  3, 3, 4, 0));
    prog.push_back(I(OP_OR,   7, 7, 3, 0));          // 0x0999_0005_0000
    body_start = prog.size();
    prog.push_back(I(OP_LD,   8, 1, -1, 0));
    prog.push_back(I(OP_ADDI, 9, 8, -1, 5));
    prog.push_back(I(OP_ADD, 10, 9, 9, 0));
    prog.push_back(I(OP_LD,  11, 1, -1, 8));
    prog.push_back(I(OP_XOR, 12, 11, 10, 0));
    prog.push_back(I(OP_ST,  -1, 5, 12, 0));
    prog.push_back(I(OP_ADDI, 5, 5, -1, 8));
    prog.push_back(I(OP_LD,  13, 6, -1, 16'h0808));   // crosses bit 20 once r6 has grown
    prog.push_back(I(OP_LD,  14, 7, -1, 16));
    prog.push_back(I(OP_MUL, 15, 13, 2, 0));
    prog.push_back(I(OP_SUB,  9, 15, 15, 0));
    prog.push_back(I(OP_SRA, 10, 8, 2, 0));
    prog.push_back(I(OP_ADD, 12, 10, 11, 0));
    prog.push_back(I(OP_ADDI, 8, 0, -1, 16'h7FFF));
    prog.push_back(I(OP_SLL,  8, 8, 4, 0));           // 0x7FFF_0000: too wide for 20b
    prog.push_back(I(OP_AND, 11, 8, 14, 0));
    prog.push_back(I(OP_ST,  -1, 5, 9, 0));
    prog.push_back(I(OP_ADDI, 5, 5, -1, 8));
    prog.push_back(I(OP_ADDI, 1, 1, -1, 24));
    prog.push_back(I(OP_ADDI, 6, 6, -1, 16'h0400));
    prog.push_back(I(OP_OR,  13, 12, 9, 0));
    prog.push_back(I(OP_ST,  -1, 5, 13, 0));
    prog.push_back(I(OP_ADDI, 5, 5, -1, 8));
  end

  function automatic logic [XLEN-1:0] ref_alu(op_e op, logic [XLEN-1:0] a, logic [XLEN-1:0] b,
                                              logic [15:0] imm);
    logic [XLEN-1:0] ix = XLEN'($signed(imm));
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_SRA:  return XLEN'($signed(a) >>> b[5:0]);
      OP_MUL:  return a * b;
      default: return a + ix;
    endcase
  endfunction

  // ------------------------------------------------------------ reference state
  logic [XLEN-1:0] arch_val [N_ARCH];
  int              map      [N_ARCH];
  int              free_q[$];
  logic [XLEN-1:0] exp_va   [256];
  logic [XLEN-1:0] exp_data [256];
  bit              exp_st   [256];
  bit              is_ld    [256];
  int              done_cnt [256];
  int              n_ids;
  op_e             prog_op [256];

  // ------------------------------------------------------------ memory side
  typedef struct { longint unsigned due; tag_t tag; logic [XLEN-1:0] data; int id; } ldret_t;
  ldret_t ldq[$];
  logic [XLEN-1:0] fillq[$];
  int n_req = 0, n_l0 = 0;

  task automatic mem_req_chk(memreq_t r, string who);
    int id = int'(r.id);
    check(id < n_ids, $sformatf("%s request id %0d unknown", who, id));
    check(r.is_st == exp_st[id], $sformatf("%s id %0d st flag", who, id));
    check(r.va == exp_va[id], $sformatf("%s id %0d va %h exp %h", who, id, r.va, exp_va[id]));
    n_req++;
    if (r.pa_v) begin
      n_l0++;
      check(r.pa == {xlate(r.va), r.va[14:0]}, $sformatf("%s id %0d pa %h", who, id, r.pa));
    end else fillq.push_back(r.va);
    if (r.is_st) begin
      check(r.data == exp_data[id], $sformatf("%s id %0d st data %h exp %h", who, id, r.data, exp_data[id]));
    end else begin
      ldret_t x; x.due = cyc + 6; x.tag = r.dst; x.data = mem_val(r.va); x.id = id;
      ldq.push_back(x);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (nmem_valid) mem_req_chk(nmem_req, "narrow");
    if (wmem_valid) mem_req_chk(wmem_req, "wide");
    for (int k = 0; k < 3; k++)
      if (done_valid[k]) begin
        check(int'(done_id[k]) < n_ids && !is_ld[done_id[k]], $sformatf("done id %0d", done_id[k]));
        done_cnt[done_id[k]]++;
      end
  end

  // load returns and level-1 TLB fills, driven at the negative edge
  always @(negedge clk) begin : mem_side
    ldret_t x;
    logic [XLEN-1:0] va;
    ld_valid <= '0;
    tlb_fill_valid <= 1'b0;
    for (int p = 0; p < 2; p++)
      if (ldq.size() > 0 && ldq[0].due <= cyc) begin
        x = ldq.pop_front();
        ld_valid[p] <= 1'b1;
        ld_tag[p]   <= x.tag;
        ld_data[p]  <= x.data;
        done_cnt[x.id]++;
      end
    if (fillq.size() > 0) begin
      va = fillq.pop_front();
      tlb_fill_valid <= 1'b1;
      tlb_fill_va    <= va;
      tlb_fill_ppn   <= xlate(va);
      tlb_fill_attr  <= 4'hF;
    end
  end

  // ------------------------------------------------------------ event counters
  int c_narrow, c_corr, c_mis, c_replay, c_ovf, c_w2s, c_w2a, c_b2a, c_evict, c_l0hit, c_l0miss, c_ld;
  int c_disp, c_pnarrow;
  always @(posedge clk) if (rst_n) begin
    c_narrow += int'(ev.steer_narrow);   c_corr   += int'(ev.steer_corrected);
    c_mis    += int'(ev.mispredict);     c_replay += int'(ev.replay_issue);
    c_ovf    += int'(ev.addr_ovf);       c_w2s    += int'(ev.wide_to_simple);
    c_w2a    += int'(ev.wide_to_addr);   c_b2a    += int'(ev.base_to_addr);
    c_evict  += int'(ev.addr_evict);     c_l0hit  += int'(ev.l0_hit);
    c_l0miss += int'(ev.l0_miss);        c_ld     += int'(ev.load_wb);
    c_disp    += int'(disp_valid && disp_ready);
    c_pnarrow += int'(disp_valid && disp_ready && disp_pred_narrow);
  end

  // ------------------------------------------------------------ driver
  task automatic dispatch(int k, int pcidx);
    ins_t x = prog[k];
    uop_t u;
    int id = n_ids;
    logic [XLEN-1:0] a, b, r;
    u = '0;
    u.id = ID_W'(id);
    u.pc = 64'h1000 + 64'(pcidx) * 4;
    u.op = x.op;
    u.imm = x.imm;
    u.s1_v = 1'b1; u.s1 = tag_t'(map[x.a]);
    u.s2_v = (x.b >= 0); u.s2 = (x.b >= 0) ? tag_t'(map[x.b]) : '0;
    a = arch_val[x.a];
    b = (x.b >= 0) ? arch_val[x.b] : '0;
    exp_st[id] = (x.op == OP_ST); prog_op[id] = x.op;
    is_ld[id]  = (x.op == OP_LD);
    done_cnt[id] = 0;
    if (is_mem(x.op)) begin
      exp_va[id]   = a + XLEN'($signed(x.imm));
      exp_data[id] = b;
    end
    if (x.d >= 0) begin
      int p = free_q.pop_front();
      u.dst_v = 1'b1; u.dst = tag_t'(p);
      r = (x.op == OP_LD) ? mem_val(exp_va[id]) : ref_alu(x.op, a, b, x.imm);
      arch_val[x.d] = r;
      map[x.d] = p;
    end
    n_ids++;
    // fetch: predictor lookup, result one cycle later
    @(negedge clk);
    fetch_valid = 1'b1; fetch_pc = u.pc;
    @(negedge clk);
    fetch_valid = 1'b0;
    disp_uop = u; disp_pred_narrow = fetch_pred_narrow; disp_valid = 1'b1;
    @(posedge clk);
    while (!disp_ready) @(posedge clk);
    @(negedge clk);
    disp_valid = 1'b0;
  endtask

  task automatic drain_and_check();
    int waited = 0;
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < n_ids; i++) if (done_cnt[i] == 0) all = 0;
      waited++;
    end while (!all && waited < 20000);
    repeat (20) @(posedge clk);
    for (int i = 0; i < n_ids; i++)
      check(done_cnt[i] == 1, $sformatf("id %0d completed %0d times", i, done_cnt[i]));
    for (int r = 1; r < N_ARCH; r++) begin
      int p = map[r];
      vtype_e vt = dut.u_rd.vt_q[p];
      logic [PTR_W-1:0] ptr = dut.u_rd.ptr_q[p];
      check(dut.u_long.mem_q[p] == arch_val[r],
            $sformatf("r%0d (p%0d) long %h exp %h", r, p, dut.u_long.mem_q[p], arch_val[r]));
      if (vt == VT_SIMPLE)
        check(sext_nw(dut.u_simple.mem_q[p]) == arch_val[r], $sformatf("r%0d simple copy", r));
      else if (vt == VT_ADDR)
        check(dut.u_addr.vld_q[ptr] && {dut.u_addr.val_q[ptr], dut.u_simple.mem_q[p]} == arch_val[r]
              && ptr == arch_val[r][NW-1 -: PTR_W], $sformatf("r%0d addr copy", r));
    end
    // free every physical register that is no longer mapped
    free_q.delete();
    for (int p = N_ARCH; p < NPREG; p++) begin
      bit used = 0;
      for (int r = 0; r < N_ARCH; r++) if (map[r] == p) used = 1;
      if (!used) free_q.push_back(p);
    end
    n_ids = 0;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_valid = 0; fetch_pc = '0; disp_valid = 0; disp_uop = '0; disp_pred_narrow = 0;
    ld_valid = '0; ld_tag = '0; ld_data = '0;
    tlb_fill_valid = 0; tlb_fill_va = '0; tlb_fill_ppn = '0; tlb_fill_attr = '0;
    for (int r = 0; r < N_ARCH; r++) begin arch_val[r] = '0; map[r] = r; end
    for (int p = N_ARCH; p < NPREG; p++) free_q.push_back(p);
    n_ids = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < body_start; k++) dispatch(k, k);
    drain_and_check();
    for (int c = 0; c < N_CHUNK; c++) begin
      int iters;
      iters = 0;
      while (free_q.size() >= 20 && iters < 5) begin
        for (int k = body_start; k < prog.size(); k++) dispatch(k, k);
        iters++;
      end
      drain_and_check();
      // an idle stretch lets the background freeing of Addr entries act
      if (c == 2) repeat (4 * FREE_P) @(posedge clk);
    end
    $display("events: narrow=%0d corrected=%0d mispredict=%0d replay=%0d addr_ovf=%0d w2simple=%0d w2addr=%0d base2addr=%0d evict=%0d l0hit=%0d l0miss=%0d loads=%0d reqs=%0d",
             c_narrow, c_corr, c_mis, c_replay, c_ovf, c_w2s, c_w2a, c_b2a, c_evict, c_l0hit, c_l0miss, c_ld, n_req);
    // The quantities the design is judged by: share of instructions that
    // completed in the fast cluster, how often a narrow prediction had to be
    // corrected or replayed, share of loads/stores translated by the
    // level-0 TLB.
    $display("completed in the fast cluster: %0d of %0d dispatched (%0d%%)",
             c_narrow - c_mis, c_disp, (c_narrow - c_mis) * 100 / c_disp);
    $display("narrow predictions: %0d, corrected at dispatch %0d, replayed %0d",
             c_pnarrow, c_corr, c_mis);
    $display("loads/stores translated by the level-0 TLB: %0d of %0d (%0d%%)",
             c_l0hit, n_req, c_l0hit * 100 / n_req);
    check(c_narrow > 0, "no instruction steered narrow");
    check(c_corr > 0, "no steering correction");
    check(c_mis > 0, "no narrow mis-prediction");
    check(c_replay == c_mis, "replays issued differ from mis-predictions");
    check(c_ovf > 0, "no 20b address overflow");
    check(c_w2s > 0, "no wide result forwarded as Simple");
    check(c_w2a > 0, "no wide result forwarded as Addr");
    check(c_b2a > 0, "no base register retyped Addr");
    check(c_evict > 0, "no Addr entry freed or replaced");
    check(c_l0hit > 0, "no level-0 TLB hit");
    check(c_l0miss > 0, "no level-0 TLB miss");
    check(c_ld > 0, "no load write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
