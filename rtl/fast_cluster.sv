// fast_cluster: the narrow (20b) cluster, clocked at twice the slow rate.
//
// Pipeline, one fast cycle per stage:
//   ISSUE   - single-issue select from the FAST IQ (issue_queue, 1 lane).
//             Sources are ready when their tag (and value, if narrow) has
//             reached this cluster (avail). hold stops issue when the wide
//             cluster's replay port could overflow.
//   RF READ - Simple file and register descriptors (RD, PTR) of the sources.
//             A Long source sets the mis-prediction flag; so does any
//             non-Simple source of a non-memory op or a non-Simple store
//             datum. A Ld/St base may be Simple or Addr.
//   EXE     - narrow_alu. For a Ld/St with an Addr base the Addr register
//             (selected by the base's PTR) is read and the level-0 TLB is
//             looked up in parallel with the 20b add; the 64b address is the
//             Addr register's 44 bits above the 20b sum. ALU overflow, an
//             invalid Addr entry, or one changed since the base was typed
//             (addr_recent) also set the flag.
// At the end of EXE exactly one of the following leaves the cluster:
//   res_*  - a correct result (written to the Simple file, typed Simple,
//            sent to the wide cluster for the Long file);
//   mem_*  - a Ld/St request (load results come back through the shared
//            load write-back);
//   rep_*  - a mis-predicted instruction: its payload goes to the wide
//            cluster for replay, and its destination is typed Long and made
//            available here so local dependents issue, see the Long type and
//            replay too.
// pupd_* reports the outcome to the steering predictor (narrow = no
// mis-prediction). There is no bypass network: a dependent issues the cycle
// after its producer leaves EXE. Stage actions follow the document; the
// missing bypass, the hold rule and the recent-change check are this
// design's choices.
module fast_cluster
  import acp_pkg::*;
#(
  parameter int IQ_DEPTH = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch
  input  logic                 disp_valid,
  input  uop_t                 disp_uop,
  output logic                 iq_full,
  input  logic [NPREG-1:0]     avail,
  input  logic                 hold,
  // RF READ ports (Simple file and RD)
  output tag_t [1:0]           rf_tag,
  input  logic [1:0][NW-1:0]   rf_data,
  input  vtype_e [1:0]         rf_vt,
  input  logic [1:0][PTR_W-1:0] rf_ptr,
  // Addr file read in EXE
  output logic                 ar_en,
  output logic [PTR_W-1:0]     ar_idx,
  input  logic                 ar_valid,
  input  logic [UPPER_W-1:0]   ar_upper,
  input  logic [NADDR-1:0]     addr_recent,
  // level-0 TLB lookup in EXE
  output logic [XLEN-1:0]      tlb_va,
  input  logic                 tlb_hit,
  input  logic [PA_W-1:0]      tlb_pa,
  // EXE outcome
  output logic                 res_valid,
  output tag_t                 res_tag,
  output logic [NW-1:0]        res_val,
  output logic                 mem_valid,
  output memreq_t              mem_req,
  output logic                 rep_valid,
  output uop_t                 rep_uop,
  output logic                 done_valid,
  output logic [ID_W-1:0]      done_id,
  output logic                 pupd_valid,
  output logic [XLEN-1:0]      pupd_pc,
  output logic                 pupd_narrow,
  output logic                 ev_addr_ovf
);
  // ISSUE
  logic [0:0] iss_v;
  uop_t [0:0] iss_u;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;

  issue_queue #(.DEPTH(IQ_DEPTH), .ISSUE_W(1), .MEM_LANES(1'b1)) u_iq (
    .clk, .rst_n,
    .ins_valid (disp_valid), .ins_uop (disp_uop), .full (iq_full), .count (iq_count),
    .avail, .lane_en (!hold), .iss_valid (iss_v), .iss_uop (iss_u));

  // RF READ
  logic rr_v;
  uop_t rr_u;
  logic rr_bad;

  assign rf_tag[0] = rr_u.s1;
  assign rf_tag[1] = rr_u.s2;

  always_comb begin
    rr_bad = 1'b0;
    if (is_mem(rr_u.op)) begin
      if (rr_u.s1_v && rf_vt[0] == VT_LONG)   rr_bad = 1'b1;
      if (rr_u.s2_v && rf_vt[1] != VT_SIMPLE) rr_bad = 1'b1;
    end else begin
      if (rr_u.s1_v && rf_vt[0] != VT_SIMPLE) rr_bad = 1'b1;
      if (rr_u.s2_v && rf_vt[1] != VT_SIMPLE) rr_bad = 1'b1;
    end
  end

  // EXE
  logic             ex_v, ex_bad, ex_addr;
  uop_t             ex_u;
  logic [NW-1:0]    ex_a, ex_b;
  logic [PTR_W-1:0] ex_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_v <= 1'b0; rr_u <= '0;
      ex_v <= 1'b0; ex_u <= '0; ex_bad <= 1'b0; ex_addr <= 1'b0;
      ex_a <= '0;   ex_b <= '0; ex_ptr <= '0;
    end else begin
      rr_v    <= iss_v[0];
      rr_u    <= iss_u[0];
      ex_v    <= rr_v;
      ex_u    <= rr_u;
      ex_bad  <= rr_bad;
      ex_a    <= rr_u.s1_v ? rf_data[0] : '0;
      ex_b    <= rr_u.s2_v ? rf_data[1] : '0;
      ex_addr <= is_mem(rr_u.op) && rr_u.s1_v && rf_vt[0] == VT_ADDR;
      ex_ptr  <= rf_ptr[0];
    end
  end

  logic [NW-1:0] y;
  logic          ovf, mis, mem_op;

  narrow_alu u_alu (.op (ex_u.op), .a (ex_a), .b (ex_b), .imm (ex_u.imm),
                    .a_is_addr (ex_addr), .y, .ovf);

  always_comb begin
    mem_op = is_mem(ex_u.op);
    ar_en  = ex_v && !ex_bad && ex_addr;
    ar_idx = ex_ptr;
    tlb_va = ex_addr ? {ar_upper, y} : sext_nw(y);
    mis    = ex_bad || ovf ||
             (ex_addr && (!ar_valid || addr_recent[ex_ptr]));

    res_valid = ex_v && !mis && !mem_op && ex_u.dst_v;
    res_tag   = ex_u.dst;
    res_val   = y;

    mem_valid      = ex_v && !mis && mem_op;
    mem_req.id     = ex_u.id;
    mem_req.is_st  = (ex_u.op == OP_ST);
    mem_req.dst    = ex_u.dst;
    mem_req.va     = tlb_va;
    mem_req.pa_v   = ex_addr && tlb_hit;
    mem_req.pa     = tlb_pa;
    mem_req.data   = sext_nw(ex_b);

    rep_valid = ex_v && mis;
    rep_uop   = ex_u;

    done_valid = ex_v && !mis && (ex_u.op != OP_LD);
    done_id    = ex_u.id;

    pupd_valid  = ex_v;
    pupd_pc     = ex_u.pc;
    pupd_narrow = !mis;
    ev_addr_ovf = ex_v && !ex_bad && ex_addr && ovf;
  end

  logic unused;
  assign unused = ^iq_count;
endmodule
