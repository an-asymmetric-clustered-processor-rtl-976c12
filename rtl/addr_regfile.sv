// addr_regfile: the Addr ("Short") register file.
//
// N entries, each holding the invariant upper UPPER_W (44) bits of frequently
// used addresses, with a valid bit and a use bit. An entry is selected by the
// PTR field of a value (bits [19:17] for 8 entries), so the file is direct
// mapped on those address bits.
//
//  * lk_*  (NLK ports): classification lookups of write-back values. A hit
//    (valid and equal) sets the use bit.
//  * bc_*  : Ld/St base-register check from the wide cluster, once per slow
//    cycle. Hit: use bit set. Miss on an invalid entry, or on a valid entry
//    whose use bit is still clear: the entry is (re)written with the base's
//    upper bits, valid, use clear. This is the only way entries are written.
//    bc_addr tells whether the base register may now be typed Addr.
//  * nr_*  : read by a fast-cluster Ld/St in EXE; sets the use bit.
//  * peek_*: side-effect-free read (used to validate level-0 TLB fills).
//  * Background freeing: on each slow-cycle enable (ce) the idle counter of
//    every used entry advances, and an entry that has been used but not
//    accessed for FREE_PERIOD slow cycles is freed.
//  * evict[i] pulses for one cycle when entry i is freed or replaced;
//    recent[i] stays high for GUARD cycles after entry i was written or
//    freed, so a reader that typed a register Addr before the change can
//    tell that the entry no longer holds that register's upper part.
// Lookup results are combinational; all updates take effect at the clock
// edge. Valid/use bits, replacement of unused entries and background freeing
// follow the document; the exact period (FREE_PERIOD = 2 x 128 ROB entries),
// the guard window and the port set are this design's choices.
module addr_regfile
  import acp_pkg::*;
#(
  parameter int N           = 8,
  parameter int UW          = 44,
  parameter int NLK         = 4,
  parameter int FREE_PERIOD = 256,
  parameter int GUARD       = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic [NLK-1:0]                lk_en,
  input  logic [NLK-1:0][$clog2(N)-1:0] lk_idx,
  input  logic [NLK-1:0][UW-1:0]        lk_upper,
  output logic [NLK-1:0]                lk_hit,
  input  logic                          bc_en,
  input  logic [$clog2(N)-1:0]          bc_idx,
  input  logic [UW-1:0]                 bc_upper,
  output logic                          bc_hit,
  output logic                          bc_addr,
  input  logic                          nr_en,
  input  logic [$clog2(N)-1:0]          nr_idx,
  output logic                          nr_valid,
  output logic [UW-1:0]                 nr_upper,
  input  logic [$clog2(N)-1:0]          peek_idx,
  output logic                          peek_valid,
  output logic [UW-1:0]                 peek_upper,
  output logic [N-1:0]                  evict,
  output logic [N-1:0]                  recent,
  output logic [N-1:0]                  valid_o
);
  localparam int CW = $clog2(FREE_PERIOD + 1);
  localparam int GW = $clog2(GUARD + 1);

  logic [UW-1:0] val_q  [N];
  logic [N-1:0]  vld_q, use_q;
  logic [CW-1:0] idle_q [N];
  logic [GW-1:0] grd_q  [N];

  logic bc_alloc;

  always_comb begin
    for (int p = 0; p < NLK; p++)
      lk_hit[p] = vld_q[lk_idx[p]] && (val_q[lk_idx[p]] == lk_upper[p]);
    bc_hit     = vld_q[bc_idx] && (val_q[bc_idx] == bc_upper);
    bc_alloc   = bc_en && !bc_hit && (!vld_q[bc_idx] || !use_q[bc_idx]);
    bc_addr    = bc_en && (bc_hit || bc_alloc);
    nr_valid   = vld_q[nr_idx];
    nr_upper   = val_q[nr_idx];
    peek_valid = vld_q[peek_idx];
    peek_upper = val_q[peek_idx];
    valid_o    = vld_q;
    for (int i = 0; i < N; i++) recent[i] = (grd_q[i] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      use_q <= '0;
      evict <= '0;
      for (int i = 0; i < N; i++) begin
        val_q[i]  <= '0;
        idle_q[i] <= '0;
        grd_q[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        logic touch, alloc, free;
        touch = (nr_en && nr_idx == i[$clog2(N)-1:0]) ||
                (bc_en && bc_hit && bc_idx == i[$clog2(N)-1:0]);
        for (int p = 0; p < NLK; p++)
          if (lk_en[p] && lk_hit[p] && lk_idx[p] == i[$clog2(N)-1:0]) touch = 1'b1;
        alloc = bc_alloc && bc_idx == i[$clog2(N)-1:0];
        free  = !alloc && !touch && ce && vld_q[i] && use_q[i] &&
                (idle_q[i] >= CW'(FREE_PERIOD - 1));
        evict[i] <= (alloc && vld_q[i]) || free;
        if (alloc) begin
          val_q[i]  <= bc_upper;
          vld_q[i]  <= 1'b1;
          use_q[i]  <= 1'b0;
          idle_q[i] <= '0;
        end else if (free) begin
          vld_q[i]  <= 1'b0;
          use_q[i]  <= 1'b0;
          idle_q[i] <= '0;
        end else if (touch && vld_q[i]) begin
          use_q[i]  <= 1'b1;
          idle_q[i] <= '0;
        end else if (ce && vld_q[i] && use_q[i]) begin
          idle_q[i] <= idle_q[i] + 1'b1;
        end
        if (alloc || free)       grd_q[i] <= GW'(GUARD);
        else if (grd_q[i] != '0) grd_q[i] <= grd_q[i] - 1'b1;
      end
    end
  end
endmodule
