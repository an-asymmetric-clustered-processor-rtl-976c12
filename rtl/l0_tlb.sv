// l0_tlb: level-0 TLB that sits beside the Addr register file.
//
// Direct mapped and indexed by the Addr register number (PTR), so it can be
// read in the execute stage in parallel with the narrow address addition:
// the translation is ready when the address is, a 0-cycle translation. Each
// entry translates one page of PAGE_BITS (32KB) inside the region named by
// its Addr register; the address bits between the page offset and the PTR
// field (VA[16:15] with 8 entries) are kept as a small tag. The upper 44 bits
// need no comparison: they are the Addr register's, which is why an entry is
// invalidated whenever its Addr register is freed or replaced (inv mask).
// A miss is served by the conventional level-1 TLB outside this design,
// whose answer is written back through the fill port.
// Lookup is combinational; fills and invalidations act at the clock edge
// (an invalidation wins over a fill of the same entry).
// Indexing by Addr number, direct mapping and the 32KB page follow the
// document; the tag, physical-address width and attribute bits are this
// design's choices.
module l0_tlb
  import acp_pkg::*;
#(
  parameter int N         = 8,
  parameter int PAGE_BITS = 15,
  parameter int PAW       = 44,
  parameter int AW        = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [XLEN-1:0]       lk_va,       // PTR is taken from lk_va
  output logic                  lk_hit,
  output logic [PAW-1:0]        lk_pa,
  output logic [AW-1:0]         lk_attr,
  input  logic                  fill_en,
  input  logic [XLEN-1:0]       fill_va,
  input  logic [PAW-PAGE_BITS-1:0] fill_ppn,
  input  logic [AW-1:0]         fill_attr,
  input  logic [N-1:0]          inv
);
  localparam int IW  = $clog2(N);
  // Page-number bits between the page offset and the PTR field. With 32
  // entries and 32KB pages there are none: a 1-bit tag tied to 0 stands in.
  localparam int TGB = NW - IW - PAGE_BITS;
  localparam int TGW = (TGB > 0) ? TGB : 1;
  localparam int PPW = PAW - PAGE_BITS;

  logic [N-1:0]   vld_q;
  logic [TGW-1:0] tag_q  [N];
  logic [PPW-1:0] ppn_q  [N];
  logic [AW-1:0]  attr_q [N];

  logic [IW-1:0]  lk_idx, fill_idx;
  logic [TGW-1:0] lk_tag, fill_tag;

  always_comb begin
    lk_idx   = lk_va[NW-1 -: IW];
    lk_tag   = (TGB > 0) ? lk_va[PAGE_BITS +: TGW] : '0;
    fill_idx = fill_va[NW-1 -: IW];
    fill_tag = (TGB > 0) ? fill_va[PAGE_BITS +: TGW] : '0;
    lk_hit   = vld_q[lk_idx] && (tag_q[lk_idx] == lk_tag);
    lk_pa    = {ppn_q[lk_idx], lk_va[PAGE_BITS-1:0]};
    lk_attr  = attr_q[lk_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      for (int i = 0; i < N; i++) begin
        tag_q[i]  <= '0;
        ppn_q[i]  <= '0;
        attr_q[i] <= '0;
      end
    end else begin
      if (fill_en) begin
        vld_q[fill_idx]  <= 1'b1;
        tag_q[fill_idx]  <= fill_tag;
        ppn_q[fill_idx]  <= fill_ppn;
        attr_q[fill_idx] <= fill_attr;
      end
      for (int i = 0; i < N; i++)
        if (inv[i]) vld_q[i] <= 1'b0;
    end
  end
endmodule
