// asym_cluster_core: integer back end of an asymmetric clustered processor.
//
// Two integer clusters share one front end and one data cache: a 64b slow
// cluster with two ALUs and a 20b fast cluster with one ALU running at twice
// the clock rate. Instructions are steered by a PC-indexed predictor of which
// cluster they belong to, corrected with the value types of ready sources.
// Every physical register exists in both clusters: 64b in the Long file, 20b
// in the Simple file, with a value-type descriptor (Simple / Long / Addr).
// Addr values keep their invariant upper 44 bits in a small Addr file, so
// most address arithmetic runs in the fast cluster, and the Addr file index
// also selects a level-0 TLB entry, giving the translation with the address.
//
// Clocking: clk is the fast clock. slow_ce is high every second cycle and is
// the slow cluster's clock enable; the two clusters are thus two synchronous
// clocks in a 2:1 ratio. ICC_LAT (fast cycles) is the inter-cluster latency,
// applied to every value, descriptor update and replay crossing clusters.
//
// Interfaces (the parts outside this design):
//   fetch_*   - predictor lookup at fetch; fetch_pred_narrow follows one cycle
//               later and must be presented again with the instruction.
//   disp_*    - one renamed instruction per fast cycle (valid/ready). The
//               front end renames and allocates physical registers; a
//               register must not be reused while instructions may still
//               read it.
//   nmem_*/wmem_* - Ld/St requests from the fast / slow cluster (wmem only on
//               slow_ce cycles). pa_v marks a level-0 TLB translation.
//   ld_*      - two load-return ports from the data cache.
//   tlb_fill_*- translations from the level-1 TLB for the level-0 TLB; a fill
//               is accepted only if the Addr entry it maps holds its upper
//               bits.
//   done_*    - completion of non-load instructions, for the ROB (loads
//               complete with their return).
//   ev        - one-cycle event pulses.
// What follows the document: the cluster organisation, file sizes and widths,
// the RD types, the write-back classification, the Addr file and its
// replacement, the level-0 TLB, prediction and correction, replay with
// priority. This design's own choices: one dispatch per fast cycle, no
// bypass network, a single RD copy, demotion of Addr registers whose Addr
// entry changes, and the port counts.
module asym_cluster_core
  import acp_pkg::*;
#(
  parameter int PRED_ENTRIES = 4096,
  parameter int IQ_DEPTH     = 20,
  parameter int RB_DEPTH     = 8,
  parameter int ICC_LAT      = 4,
  parameter int FREE_PERIOD  = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  slow_ce,
  input  logic                  fetch_valid,
  input  logic [XLEN-1:0]       fetch_pc,
  output logic                  fetch_pred_narrow,
  input  logic                  disp_valid,
  input  uop_t                  disp_uop,
  input  logic                  disp_pred_narrow,
  output logic                  disp_ready,
  output logic                  nmem_valid,
  output memreq_t               nmem_req,
  output logic                  wmem_valid,
  output memreq_t               wmem_req,
  input  logic [1:0]            ld_valid,
  input  tag_t [1:0]            ld_tag,
  input  logic [1:0][XLEN-1:0]  ld_data,
  input  logic                  tlb_fill_valid,
  input  logic [XLEN-1:0]       tlb_fill_va,
  input  logic [PA_W-16:0]      tlb_fill_ppn,
  input  logic [ATTR_W-1:0]     tlb_fill_attr,
  output logic [2:0]            done_valid,
  output logic [2:0][ID_W-1:0]  done_id,
  output acp_events_t           ev
);
  // ---------------------------------------------------------------- clocking
  logic ce_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ce_q <= 1'b0;
    else        ce_q <= ~ce_q;
  assign slow_ce = ce_q;

  // ---------------------------------------------------------------- state
  logic [NPREG-1:0] avail_n, avail_w;     // value (or type) present per cluster

  // ---------------------------------------------------------------- predictor
  logic [2:0]           pupd_v, pupd_n;
  logic [2:0][XLEN-1:0] pupd_pc;

  cluster_predictor #(.ENTRIES(PRED_ENTRIES), .NUPD(3), .PC_W(XLEN)) u_pred (
    .clk, .rst_n, .rd_en (fetch_valid), .rd_pc (fetch_pc), .rd_narrow (fetch_pred_narrow),
    .upd_valid (pupd_v), .upd_pc (pupd_pc), .upd_narrow (pupd_n));

  // ---------------------------------------------------------------- descriptors
  tag_t   [3:0]            rd_tag;
  vtype_e [3:0]            rd_vt;
  logic   [3:0][PTR_W-1:0] rd_ptr;
  logic   [4:0]            rdw_en;
  tag_t   [4:0]            rdw_tag;
  vtype_e [4:0]            rdw_vt;
  logic   [4:0][PTR_W-1:0] rdw_ptr;
  logic   [NADDR-1:0]      evict, evict_d, recent, addr_valid;

  reg_descriptor #(.NREG(NPREG), .NRD(4), .NWR(5)) u_rd (
    .clk, .rst_n, .rd_tag, .rd_vt, .rd_ptr,
    .wr_en (rdw_en), .wr_tag (rdw_tag), .wr_vt (rdw_vt), .wr_ptr (rdw_ptr),
    .demote_mask (evict | evict_d));

  // ---------------------------------------------------------------- steering
  logic to_narrow, corrected, n_full, w_full, hold, disp_fire;

  assign rd_tag[2] = disp_uop.s1;
  assign rd_tag[3] = disp_uop.s2;

  steer_unit u_steer (
    .pred_narrow (disp_pred_narrow), .op (disp_uop.op),
    .s1_v (disp_uop.s1_v), .s1_ready (avail_n[disp_uop.s1]), .s1_vt (rd_vt[2]),
    .s2_v (disp_uop.s2_v), .s2_ready (avail_n[disp_uop.s2]), .s2_vt (rd_vt[3]),
    .to_narrow, .corrected);

  assign disp_ready = to_narrow ? !n_full : !w_full;
  assign disp_fire  = disp_valid && disp_ready;

  // ---------------------------------------------------------------- register files
  tag_t [1:0]           srf_rtag;
  logic [1:0][NW-1:0]   srf_rdata;
  logic [4:0]           srf_wen;
  tag_t [4:0]           srf_wtag;
  logic [4:0][NW-1:0]   srf_wdata;

  simple_regfile #(.NREG(NPREG), .W(NW), .NRD(2), .NWR(5)) u_simple (
    .clk, .rst_n, .rd_tag (srf_rtag), .rd_data (srf_rdata),
    .wr_en (srf_wen), .wr_tag (srf_wtag), .wr_data (srf_wdata));

  tag_t [3:0]           lrf_rtag;
  logic [3:0][XLEN-1:0] lrf_rdata;
  logic [1:0]           wb_valid;
  tag_t [1:0]           wb_tag;
  logic [1:0][XLEN-1:0] wb_val;
  logic                 n2w_v;
  n2w_t                 n2w_d;

  long_regfile #(.NREG(NPREG), .NRD(4), .NWW(2), .NWN(1), .NWL(2)) u_long (
    .clk, .rst_n, .rd_tag (lrf_rtag), .rd_data (lrf_rdata),
    .ww_en (wb_valid), .ww_tag (wb_tag), .ww_data (wb_val),
    .wn_en (n2w_v), .wn_tag (n2w_d.tag), .wn_data (n2w_d.val),
    .wl_en (ld_valid), .wl_tag (ld_tag), .wl_data (ld_data));

  // ---------------------------------------------------------------- Addr file and classification
  logic [3:0]                lk_en, lk_hit;
  logic [3:0][PTR_W-1:0]     lk_idx;
  logic [3:0][UPPER_W-1:0]   lk_upper;
  logic [3:0][XLEN-1:0]      cls_val;
  vtype_e [3:0]              cls_vt;
  logic                      bc_en, bc_hit, bc_addr;
  tag_t                      bc_tag;
  logic [XLEN-1:0]           bc_base;
  logic                      ar_en, ar_valid;
  logic [PTR_W-1:0]          ar_idx;
  logic [UPPER_W-1:0]        ar_upper;
  logic                      peek_valid;
  logic [UPPER_W-1:0]        peek_upper;

  addr_regfile #(.N(NADDR), .UW(UPPER_W), .NLK(4), .FREE_PERIOD(FREE_PERIOD),
                 .GUARD(ICC_LAT + 3)) u_addr (
    .clk, .rst_n, .ce (slow_ce),
    .lk_en, .lk_idx, .lk_upper, .lk_hit,
    .bc_en, .bc_idx (bc_base[NW-1 -: PTR_W]), .bc_upper (bc_base[XLEN-1:NW]),
    .bc_hit, .bc_addr,
    .nr_en (ar_en), .nr_idx (ar_idx), .nr_valid (ar_valid), .nr_upper (ar_upper),
    .peek_idx (tlb_fill_va[NW-1 -: PTR_W]), .peek_valid, .peek_upper,
    .evict, .recent, .valid_o (addr_valid));

  // classifier 0/1: wide-cluster results, 2/3: load returns
  assign cls_val = {ld_data[1], ld_data[0], wb_val[1], wb_val[0]};
  assign lk_en   = {ld_valid, wb_valid};
  for (genvar c = 0; c < 4; c++) begin : g_cls
    value_classifier u_cls (.value (cls_val[c]), .addr_idx (lk_idx[c]),
                            .addr_upper (lk_upper[c]), .addr_hit (lk_hit[c]), .vt (cls_vt[c]));
  end

  // ---------------------------------------------------------------- level-0 TLB
  logic [XLEN-1:0] tlb_va;
  logic            tlb_hit, fill_ok;
  logic [PA_W-1:0] tlb_pa;
  logic [ATTR_W-1:0] tlb_attr;

  assign fill_ok = tlb_fill_valid && peek_valid && !recent[tlb_fill_va[NW-1 -: PTR_W]] &&
                   (peek_upper == tlb_fill_va[XLEN-1:NW]);

  l0_tlb #(.N(NADDR), .PAGE_BITS(15), .PAW(PA_W), .AW(ATTR_W)) u_l0tlb (
    .clk, .rst_n, .lk_va (tlb_va), .lk_hit (tlb_hit), .lk_pa (tlb_pa), .lk_attr (tlb_attr),
    .fill_en (fill_ok), .fill_va (tlb_fill_va), .fill_ppn (tlb_fill_ppn),
    .fill_attr (tlb_fill_attr), .inv (evict));

  // ---------------------------------------------------------------- fast cluster
  logic          f_res_v, f_rep_v, f_done_v, f_pupd_v, f_pupd_n, f_ovf;
  tag_t          f_res_tag;
  logic [NW-1:0] f_res_val;
  uop_t          f_rep_uop;
  logic [ID_W-1:0] f_done_id;
  logic [XLEN-1:0] f_pupd_pc;

  fast_cluster #(.IQ_DEPTH(IQ_DEPTH)) u_fast (
    .clk, .rst_n,
    .disp_valid (disp_fire && to_narrow), .disp_uop, .iq_full (n_full),
    .avail (avail_n), .hold,
    .rf_tag (srf_rtag), .rf_data (srf_rdata), .rf_vt (rd_vt[1:0]), .rf_ptr (rd_ptr[1:0]),
    .ar_en, .ar_idx, .ar_valid, .ar_upper, .addr_recent (recent),
    .tlb_va, .tlb_hit, .tlb_pa,
    .res_valid (f_res_v), .res_tag (f_res_tag), .res_val (f_res_val),
    .mem_valid (nmem_valid), .mem_req (nmem_req),
    .rep_valid (f_rep_v), .rep_uop (f_rep_uop),
    .done_valid (f_done_v), .done_id (f_done_id),
    .pupd_valid (f_pupd_v), .pupd_pc (f_pupd_pc), .pupd_narrow (f_pupd_n),
    .ev_addr_ovf (f_ovf));
  assign rd_tag[0] = srf_rtag[0];
  assign rd_tag[1] = srf_rtag[1];

  // ---------------------------------------------------------------- inter-cluster links
  logic rep_arr_v;
  uop_t rep_arr;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_count;
  logic [$clog2(ICC_LAT+1)-1:0]  rep_inflight;

  icc_pipe #(.T(n2w_t), .LAT(ICC_LAT)) u_icc_n2w (
    .clk, .rst_n, .in_valid (f_res_v), .in_data ('{tag: f_res_tag, val: f_res_val}),
    .out_valid (n2w_v), .out_data (n2w_d));

  icc_pipe #(.T(uop_t), .LAT(ICC_LAT)) u_icc_rep (
    .clk, .rst_n, .in_valid (f_rep_v), .in_data (f_rep_uop),
    .out_valid (rep_arr_v), .out_data (rep_arr));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rep_inflight <= '0;
    else        rep_inflight <= rep_inflight + ($clog2(ICC_LAT+1))'(f_rep_v)
                                             - ($clog2(ICC_LAT+1))'(rep_arr_v);

  // the fast cluster stops issuing when two more replays (its RF READ and
  // EXE stages) might not fit in the replay buffer
  assign hold = (32'(rb_count) + 32'(rep_inflight) + 32'(f_rep_v) + 2) >= RB_DEPTH;

  logic [1:0] w2n_in_v, w2n_v;
  w2n_t [1:0] w2n_in, w2n_d;

  always_comb begin
    w2n_in_v[0] = wb_valid[0] || (bc_en && bc_addr);
    if (wb_valid[0])
      w2n_in[0] = '{tag: wb_tag[0], vt: cls_vt[0], low: wb_val[0][NW-1:0],
                    ptr: wb_val[0][NW-1 -: PTR_W], wake: 1'b1};
    else
      w2n_in[0] = '{tag: bc_tag, vt: VT_ADDR, low: bc_base[NW-1:0],
                    ptr: bc_base[NW-1 -: PTR_W], wake: 1'b0};
    w2n_in_v[1] = wb_valid[1];
    w2n_in[1]   = '{tag: wb_tag[1], vt: cls_vt[1], low: wb_val[1][NW-1:0],
                    ptr: wb_val[1][NW-1 -: PTR_W], wake: 1'b1};
  end

  for (genvar l = 0; l < 2; l++) begin : g_w2n
    icc_pipe #(.T(w2n_t), .LAT(ICC_LAT)) u_icc_w2n (
      .clk, .rst_n, .in_valid (w2n_in_v[l]), .in_data (w2n_in[l]),
      .out_valid (w2n_v[l]), .out_data (w2n_d[l]));
  end

  // Addr-entry changes are applied again when messages sent before them
  // have arrived
  logic evict_dv;
  icc_pipe #(.T(logic [NADDR-1:0]), .LAT(ICC_LAT)) u_icc_evict (
    .clk, .rst_n, .in_valid (|evict), .in_data (evict),
    .out_valid (evict_dv), .out_data (evict_d));

  // ---------------------------------------------------------------- slow cluster
  logic [1:0]            s_done_v, s_pupd_v, s_pupd_n;
  logic [1:0][ID_W-1:0]  s_done_id;
  logic [1:0][XLEN-1:0]  s_pupd_pc;
  logic                  s_replay;

  slow_cluster #(.IQ_DEPTH(IQ_DEPTH), .RB_DEPTH(RB_DEPTH)) u_slow (
    .clk, .rst_n, .ce (slow_ce),
    .disp_valid (disp_fire && !to_narrow), .disp_uop, .iq_full (w_full),
    .avail (avail_w),
    .rep_in_valid (rep_arr_v), .rep_in_uop (rep_arr), .rb_count,
    .rf_tag (lrf_rtag), .rf_data (lrf_rdata),
    .wb_valid, .wb_tag, .wb_val,
    .mem_valid (wmem_valid), .mem_req (wmem_req),
    .bc_en, .bc_tag, .bc_base, .bc_addr,
    .done_valid (s_done_v), .done_id (s_done_id),
    .pupd_valid (s_pupd_v), .pupd_pc (s_pupd_pc), .pupd_narrow (s_pupd_n),
    .ev_replay (s_replay));

  // ---------------------------------------------------------------- write ports
  always_comb begin
    // port 0: fast-cluster outcome
    rdw_en[0]  = f_res_v || (f_rep_v && f_rep_uop.dst_v);
    rdw_tag[0] = f_res_v ? f_res_tag : f_rep_uop.dst;
    rdw_vt[0]  = f_res_v ? VT_SIMPLE : VT_LONG;
    rdw_ptr[0] = f_res_val[NW-1 -: PTR_W];
    srf_wen[0] = f_res_v;  srf_wtag[0] = f_res_tag;  srf_wdata[0] = f_res_val;
    // ports 1,2: updates arriving from the wide cluster
    for (int l = 0; l < 2; l++) begin
      rdw_en[1+l]    = w2n_v[l];
      rdw_tag[1+l]   = w2n_d[l].tag;
      rdw_vt[1+l]    = w2n_d[l].vt;
      rdw_ptr[1+l]   = w2n_d[l].ptr;
      srf_wen[1+l]   = w2n_v[l] && (w2n_d[l].vt != VT_LONG);
      srf_wtag[1+l]  = w2n_d[l].tag;
      srf_wdata[1+l] = w2n_d[l].low;
    end
    // ports 3,4: load returns
    for (int l = 0; l < 2; l++) begin
      rdw_en[3+l]    = ld_valid[l];
      rdw_tag[3+l]   = ld_tag[l];
      rdw_vt[3+l]    = cls_vt[2+l];
      rdw_ptr[3+l]   = ld_data[l][NW-1 -: PTR_W];
      srf_wen[3+l]   = ld_valid[l] && (cls_vt[2+l] != VT_LONG);
      srf_wtag[3+l]  = ld_tag[l];
      srf_wdata[3+l] = ld_data[l][NW-1:0];
    end
  end

  // ---------------------------------------------------------------- availability
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avail_n <= '1;
      avail_w <= '1;
    end else begin
      if (disp_fire && disp_uop.dst_v) begin
        avail_n[disp_uop.dst] <= 1'b0;
        avail_w[disp_uop.dst] <= 1'b0;
      end
      if (f_res_v)                      avail_n[f_res_tag]      <= 1'b1;
      if (f_rep_v && f_rep_uop.dst_v)   avail_n[f_rep_uop.dst]  <= 1'b1;
      for (int l = 0; l < 2; l++) begin
        if (w2n_v[l] && w2n_d[l].wake)  avail_n[w2n_d[l].tag]   <= 1'b1;
        if (wb_valid[l])                avail_w[wb_tag[l]]      <= 1'b1;
        if (ld_valid[l]) begin
          avail_n[ld_tag[l]] <= 1'b1;
          avail_w[ld_tag[l]] <= 1'b1;
        end
      end
      if (n2w_v)                        avail_w[n2w_d.tag]      <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- predictor updates, completion
  assign pupd_v  = {s_pupd_v, f_pupd_v};
  assign pupd_pc = {s_pupd_pc, f_pupd_pc};
  assign pupd_n  = {s_pupd_n, f_pupd_n};

  assign done_valid = {s_done_v, f_done_v};
  assign done_id    = {s_done_id, f_done_id};

  // ---------------------------------------------------------------- events
  always_comb begin
    ev.steer_narrow    = disp_fire && to_narrow;
    ev.steer_corrected = disp_fire && corrected;
    ev.mispredict      = f_rep_v;
    ev.replay_issue    = s_replay;
    ev.addr_ovf        = f_ovf;
    ev.wide_to_simple  = (wb_valid[0] && cls_vt[0] == VT_SIMPLE) || (wb_valid[1] && cls_vt[1] == VT_SIMPLE);
    ev.wide_to_addr    = (wb_valid[0] && cls_vt[0] == VT_ADDR)   || (wb_valid[1] && cls_vt[1] == VT_ADDR);
    ev.base_to_addr    = bc_en && bc_addr;
    ev.addr_evict      = |evict;
    ev.l0_hit          = nmem_valid && nmem_req.pa_v;
    ev.l0_miss         = ar_en && !tlb_hit;
    ev.load_wb         = |ld_valid;
  end

  logic unused;
  assign unused = ^{tlb_attr, evict_dv, bc_hit, addr_valid};
endmodule
