// tb_l0_tlb_sizes: the level-0 TLB at 8, 16 and 32 entries, fed the same
// stream of load/store addresses. Each lookup that misses is followed by a
// fill, as a level-1 TLB would do; random invalidations stand for Addr
// entries being replaced. Every lookup is checked against a model of the
// direct-mapped structure (index = the PTR field of bits 19 down, tag = the
// page-number bits between bit 15 and the PTR field, none at 32 entries).
// The fraction of lookups translated by each size is printed.
//
// The address stream walks a few 1MB regions with mostly small strides and
// occasional jumps, so larger TLBs (more regions held at once) hit more.
`timescale 1ns/1ps
module tb_l0_tlb_sizes;
  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{8, 16, 32};
  localparam int NACC = 6000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits [NSZ];

  logic [63:0] va;
  logic [28:0] ppn;
  logic [3:0]  attr;
  logic        look;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Translation the level-1 TLB would return for a page.
  function automatic logic [28:0] xl(logic [63:0] a);
    return 29'((a[63:15] * 49'h1_9E37_79B9) ^ 49'h0_5A5A);
  endfunction

  for (genvar s = 0; s < NSZ; s++) begin : g_sz
    localparam int N   = SIZES[s];
    localparam int IW  = $clog2(N);
    localparam int TGB = 20 - IW - 15;

    logic        lk_hit, fill_en;
    logic [43:0] lk_pa;
    logic [3:0]  lk_attr;
    logic [N-1:0] inv;

    l0_tlb #(.N(N)) dut (
      .clk, .rst_n, .lk_va (va), .lk_hit, .lk_pa, .lk_attr,
      .fill_en, .fill_va (va), .fill_ppn (ppn), .fill_attr (attr), .inv);

    bit          mv [N];
    logic [4:0]  mt [N];
    logic [28:0] mp [N];

    function automatic int idx_of(logic [63:0] a);
      return int'(a[19 -: IW]);
    endfunction
    function automatic logic [4:0] tag_of(logic [63:0] a);
      return 5'((a >> 15) & ((64'd1 << TGB) - 1));
    endfunction

    initial begin
      foreach (mv[i]) mv[i] = 0;
      fill_en = 0; inv = '0;
      hits[s] = 0;
    end

    // Check at the negative edge, set up the fill and invalidation for the
    // next rising edge.
    always @(negedge clk) if (rst_n && look) begin
      int  i;
      bit  exp_hit;
      i = idx_of(va);
      exp_hit = mv[i] && mt[i] == tag_of(va);
      checks++;
      if (lk_hit !== exp_hit || (exp_hit && lk_pa !== {mp[i], va[14:0]})) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d va=%h hit=%b exp=%b", N, va, lk_hit, exp_hit);
      end
      if (lk_hit) hits[s]++;
      fill_en = !lk_hit;
      if (!lk_hit) begin
        mv[i] = 1; mt[i] = tag_of(va); mp[i] = ppn;
      end
      inv = ($urandom % 97 == 0) ? N'(1) << ($urandom % N) : '0;
      for (int k = 0; k < N; k++) if (inv[k]) mv[k] = 0;
    end
  end

  // Address stream: 12 regions, each a base whose bits 19:15 are random.
  logic [63:0] region [12];
  initial begin
    int r;
    look = 0; va = 0; ppn = 0; attr = 0;
    foreach (region[k]) region[k] = {20'h0_0012, 12'($urandom), 32'($urandom)} & ~64'h7FFF;
    r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NACC; n++) begin
      @(posedge clk); #1;
      if ($urandom % 8 == 0) r = $urandom % 12;
      else if ($urandom % 4 == 0) region[r] = region[r] + 64'($urandom % 2048) * 8;
      va   = region[r] + 64'($urandom % 4096);
      ppn  = xl(va);
      attr = 4'(va[18:15]);
      look = 1;
    end
    @(posedge clk); #1 look = 0;
    for (int s = 0; s < NSZ; s++)
      $display("level-0 TLB %0d entries: %0d of %0d lookups translated (%0d%%)",
               SIZES[s], hits[s], NACC, hits[s] * 100 / NACC);
    if (!(hits[0] > 0 && hits[1] > 0 && hits[2] > 0)) begin
      failures++; $display("FAIL a size never hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
