// slow_cluster: the wide (64b) dual-issue cluster, running at half the rate
// of the fast cluster.
//
// The whole design runs on the fast clock; ce is high every second cycle and
// is the slow cluster's clock enable, so every stage below lasts one slow
// cycle and every output is qualified with ce (it acts at the ce edge).
//   ISSUE   - lane 0 first offers itself to the replay port: the oldest
//             replayed instruction takes it as soon as its sources are in
//             the Long file (highest priority). Otherwise the IQ (20 entries)
//             fills both lanes; only lane 0 executes Ld/St.
//   RF READ - Long file, four read ports.
//   EXE/WB  - two wide_alu. A lane's ALU result (wb_*) is written to the
//             Long file by the enclosing design, which also classifies it
//             and forwards Simple/Addr results to the fast cluster. A Ld/St
//             on lane 0 issues its request (translated by the level-1 TLB,
//             outside, so mem_req.pa_v and pa are always 0) and checks its
//             base register against the Addr file (bc_*): a base that
//             already fits 20 bits needs nothing; a base whose upper 44
//             bits are or become an Addr register's can be retyped Addr so
//             the fast cluster can compute on it.
// pupd_* tells the steering predictor whether the instruction could have run
// in the fast cluster: for ALU ops all 64b operands and the result fit 20
// bits (and the op is not MUL); for Ld/St the base is Simple or Addr.
// Stage behaviour follows the document; the single memory lane and the exact
// predictor-update rule are this design's choices.
module slow_cluster
  import acp_pkg::*;
#(
  parameter int IQ_DEPTH = 20,
  parameter int RB_DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic                   disp_valid,
  input  uop_t                   disp_uop,
  output logic                   iq_full,
  input  logic [NPREG-1:0]       avail,
  input  logic                   rep_in_valid,
  input  uop_t                   rep_in_uop,
  output logic [$clog2(RB_DEPTH+1)-1:0] rb_count,
  output tag_t [3:0]             rf_tag,
  input  logic [3:0][XLEN-1:0]   rf_data,
  output logic [1:0]             wb_valid,
  output tag_t [1:0]             wb_tag,
  output logic [1:0][XLEN-1:0]   wb_val,
  output logic                   mem_valid,
  output memreq_t                mem_req,
  output logic                   bc_en,
  output tag_t                   bc_tag,
  output logic [XLEN-1:0]        bc_base,
  input  logic                   bc_addr,
  output logic [1:0]             done_valid,
  output logic [1:0][ID_W-1:0]   done_id,
  output logic [1:0]             pupd_valid,
  output logic [1:0][XLEN-1:0]   pupd_pc,
  output logic [1:0]             pupd_narrow,
  output logic                   ev_replay
);
  // replay port
  logic rb_head_v, rep_take;
  uop_t rb_head;

  replay_buffer #(.DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n, .push (rep_in_valid), .push_uop (rep_in_uop),
    .pop (rep_take), .head_valid (rb_head_v), .head_uop (rb_head), .count (rb_count));

  assign rep_take = ce && rb_head_v &&
                    (!rb_head.s1_v || avail[rb_head.s1]) &&
                    (!rb_head.s2_v || avail[rb_head.s2]);
  assign ev_replay = rep_take;

  // ISSUE
  logic [1:0] iss_v;
  uop_t [1:0] iss_u;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;

  issue_queue #(.DEPTH(IQ_DEPTH), .ISSUE_W(2), .MEM_LANES(2'b01)) u_iq (
    .clk, .rst_n,
    .ins_valid (disp_valid), .ins_uop (disp_uop), .full (iq_full), .count (iq_count),
    .avail, .lane_en ({ce, ce && !rep_take}), .iss_valid (iss_v), .iss_uop (iss_u));

  // RF READ and EXE registers
  logic [1:0]            rr_v, ex_v;
  uop_t [1:0]            rr_u, ex_u;
  logic [1:0][XLEN-1:0]  ex_a, ex_b;

  always_comb
    for (int l = 0; l < 2; l++) begin
      rf_tag[2*l]   = rr_u[l].s1;
      rf_tag[2*l+1] = rr_u[l].s2;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_v <= '0; rr_u <= '0; ex_v <= '0; ex_u <= '0; ex_a <= '0; ex_b <= '0;
    end else if (ce) begin
      rr_v[0] <= rep_take || iss_v[0];
      rr_u[0] <= rep_take ? rb_head : iss_u[0];
      rr_v[1] <= iss_v[1];
      rr_u[1] <= iss_u[1];
      ex_v    <= rr_v;
      ex_u    <= rr_u;
      for (int l = 0; l < 2; l++) begin
        ex_a[l] <= rr_u[l].s1_v ? rf_data[2*l]   : '0;
        ex_b[l] <= rr_u[l].s2_v ? rf_data[2*l+1] : '0;
      end
    end
  end

  // EXE / WB
  logic [1:0][XLEN-1:0] y;
  for (genvar l = 0; l < 2; l++) begin : g_alu
    wide_alu u_alu (.op (ex_u[l].op), .a (ex_a[l]), .b (ex_b[l]), .imm (ex_u[l].imm), .y (y[l]));
  end

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      logic act, mem;
      act = ce && ex_v[l];
      mem = is_mem(ex_u[l].op);
      wb_valid[l]   = act && !mem && ex_u[l].dst_v;
      wb_tag[l]     = ex_u[l].dst;
      wb_val[l]     = y[l];
      done_valid[l] = act && (ex_u[l].op != OP_LD);
      done_id[l]    = ex_u[l].id;
      pupd_valid[l] = act;
      pupd_pc[l]    = ex_u[l].pc;
      if (mem)
        pupd_narrow[l] = fits_narrow(ex_a[l]) || bc_addr;
      else
        pupd_narrow[l] = (ex_u[l].op != OP_MUL) && fits_narrow(y[l]) &&
                         (!ex_u[l].s1_v || fits_narrow(ex_a[l])) &&
                         (!ex_u[l].s2_v || fits_narrow(ex_b[l]));
    end
    mem_valid     = ce && ex_v[0] && is_mem(ex_u[0].op);
    mem_req.id    = ex_u[0].id;
    mem_req.is_st = (ex_u[0].op == OP_ST);
    mem_req.dst   = ex_u[0].dst;
    mem_req.va    = y[0];
    mem_req.pa_v  = 1'b0;
    mem_req.pa    = '0;
    mem_req.data  = ex_b[0];
    bc_en         = mem_valid && ex_u[0].s1_v && !fits_narrow(ex_a[0]);
    bc_tag        = ex_u[0].s1;
    bc_base       = ex_a[0];
  end

  logic unused;
  assign unused = ^iq_count;
endmodule
