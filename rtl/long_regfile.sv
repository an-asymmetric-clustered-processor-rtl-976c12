// long_regfile: the 64b physical register file of the slow cluster.
//
// 128 x 64b with NRD combinational read ports and three groups of write
// ports: NWW from the two wide ALUs, NWN from the narrow cluster (a 20b value
// written sign-extended to 64b, as the document specifies) and NWL from load
// returns. If two ports write one register in a cycle, a load beats a narrow
// write, which beats a wide write (renaming keeps them distinct). Reset clears
// every register to 0. One narrow port per fast cycle gives the document's
// two writes from the other cluster per slow cycle.
module long_regfile
  import acp_pkg::*;
#(
  parameter int NREG = 128,
  parameter int NRD  = 4,
  parameter int NWW  = 2,
  parameter int NWN  = 1,
  parameter int NWL  = 2
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NRD-1:0][$clog2(NREG)-1:0] rd_tag,
  output logic [NRD-1:0][XLEN-1:0]         rd_data,
  input  logic [NWW-1:0]                   ww_en,
  input  logic [NWW-1:0][$clog2(NREG)-1:0] ww_tag,
  input  logic [NWW-1:0][XLEN-1:0]         ww_data,
  input  logic [NWN-1:0]                   wn_en,
  input  logic [NWN-1:0][$clog2(NREG)-1:0] wn_tag,
  input  logic [NWN-1:0][NW-1:0]           wn_data,
  input  logic [NWL-1:0]                   wl_en,
  input  logic [NWL-1:0][$clog2(NREG)-1:0] wl_tag,
  input  logic [NWL-1:0][XLEN-1:0]         wl_data
);
  logic [XLEN-1:0] mem_q [NREG];

  always_comb
    for (int r = 0; r < NRD; r++) rd_data[r] = mem_q[rd_tag[r]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) mem_q[i] <= '0;
    end else begin
      for (int w = 0; w < NWW; w++)
        if (ww_en[w]) mem_q[ww_tag[w]] <= ww_data[w];
      for (int w = 0; w < NWN; w++)
        if (wn_en[w]) mem_q[wn_tag[w]] <= sext_nw(wn_data[w]);
      for (int w = 0; w < NWL; w++)
        if (wl_en[w]) mem_q[wl_tag[w]] <= wl_data[w];
    end
  end
endmodule
