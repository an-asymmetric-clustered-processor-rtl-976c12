// issue_queue: a cluster's instruction queue and select logic.
//
// DEPTH slots of micro-op payload. One instruction can be inserted per cycle
// (into the lowest free slot); full is raised when no slot is free. Wakeup is
// done against a per-register availability vector (avail) that the cluster
// sets when a value (or, in the fast cluster, a type change) reaches it: an
// entry is ready when every source it uses is available, which is the same
// information a tag broadcast would deliver. Each cycle up to ISSUE_W ready
// entries are selected, one per enabled lane, lowest slot first; lanes whose
// MEM_LANES bit is clear never take a Ld/St. Selected entries leave the queue
// at the clock edge. iss_* are combinational.
// Queue size and issue widths come from the document; slot-order select and
// the memory-lane restriction are this design's choices.
module issue_queue
  import acp_pkg::*;
#(
  parameter int DEPTH     = 20,
  parameter int ISSUE_W   = 2,
  parameter logic [ISSUE_W-1:0] MEM_LANES = ISSUE_W'(1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ins_valid,
  input  uop_t                ins_uop,
  output logic                full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [NPREG-1:0]    avail,
  input  logic [ISSUE_W-1:0]  lane_en,
  output logic [ISSUE_W-1:0]  iss_valid,
  output uop_t [ISSUE_W-1:0]  iss_uop
);
  uop_t [DEPTH-1:0] slot_q;
  logic [DEPTH-1:0] vld_q;
  logic [DEPTH-1:0] rdy, taken;
  logic [$clog2(DEPTH)-1:0] free_idx, pick [ISSUE_W];
  logic             has_free;

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      rdy[i] = vld_q[i] && (!slot_q[i].s1_v || avail[slot_q[i].s1])
                        && (!slot_q[i].s2_v || avail[slot_q[i].s2]);
    taken = '0;
    for (int l = 0; l < ISSUE_W; l++) begin
      iss_valid[l] = 1'b0;
      pick[l]      = '0;
      iss_uop[l]   = '0;
      if (lane_en[l])
        for (int i = 0; i < DEPTH; i++)
          if (!iss_valid[l] && rdy[i] && !taken[i] &&
              (MEM_LANES[l] || !is_mem(slot_q[i].op))) begin
            iss_valid[l] = 1'b1;
            pick[l]      = ($clog2(DEPTH))'(i);
          end
      if (iss_valid[l]) begin
        taken[pick[l]] = 1'b1;
        iss_uop[l]     = slot_q[pick[l]];
      end
    end
    has_free = 1'b0;
    free_idx = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!vld_q[i]) begin
        has_free = 1'b1;
        free_idx = ($clog2(DEPTH))'(i);
      end
    full  = !has_free;
    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + vld_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q  <= '0;
      slot_q <= '0;
    end else begin
      vld_q <= vld_q & ~taken;
      if (ins_valid && has_free) begin
        vld_q[free_idx]  <= 1'b1;
        slot_q[free_idx] <= ins_uop;
      end
    end
  end

  insert_when_full: assert property (@(posedge clk) disable iff (!rst_n) ins_valid |-> has_free)
    else $error("issue_queue: insert into a full queue");
endmodule
