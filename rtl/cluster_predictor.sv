// cluster_predictor: history-based steering predictor.
//
// A tag-less table of 1-bit cells indexed by the instruction PC. A cell holds
// the cluster the instruction last turned out to belong to: 1 = narrow (fast)
// cluster, 0 = wide (slow) cluster. Reset clears every cell to 0 so a new
// instruction goes to the wide cluster and cannot be mis-steered. It is read
// in the fetch stage (registered read: rd_narrow is valid the cycle after
// rd_en) and written at write-back through NUPD update ports; when two ports
// write the same cell in one cycle the higher-numbered port wins.
// The table organisation, reset value and update point follow the document;
// the PC bits used as index (PC[2 +: log2 ENTRIES], 4-byte instructions) and
// the number of update ports are this design's choice.
module cluster_predictor #(
  parameter int ENTRIES = 4096,
  parameter int NUPD    = 3,
  parameter int PC_W    = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rd_en,
  input  logic [PC_W-1:0]            rd_pc,
  output logic                       rd_narrow,
  input  logic [NUPD-1:0]            upd_valid,
  input  logic [NUPD-1:0][PC_W-1:0]  upd_pc,
  input  logic [NUPD-1:0]            upd_narrow
);
  localparam int IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] table_q;

  function automatic logic [IW-1:0] idx(logic [PC_W-1:0] pc);
    return pc[2 +: IW];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      table_q   <= '0;
      rd_narrow <= 1'b0;
    end else begin
      if (rd_en) rd_narrow <= table_q[idx(rd_pc)];
      for (int u = 0; u < NUPD; u++)
        if (upd_valid[u]) table_q[idx(upd_pc[u])] <= upd_narrow[u];
    end
  end
endmodule
