// simple_regfile: the 20b physical register file of the fast cluster.
//
// NREG entries of W bits, NRD combinational read ports and NWR write ports
// (local narrow results, Simple/Addr results sent over from the wide
// cluster, load returns). A later write port wins on the same register;
// renaming normally keeps writes to distinct registers. Reset clears every
// register to 0. Size and width follow the document; port counts are this
// design's.
module simple_regfile #(
  parameter int NREG = 128,
  parameter int W    = 20,
  parameter int NRD  = 2,
  parameter int NWR  = 5
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NRD-1:0][$clog2(NREG)-1:0] rd_tag,
  output logic [NRD-1:0][W-1:0]            rd_data,
  input  logic [NWR-1:0]                   wr_en,
  input  logic [NWR-1:0][$clog2(NREG)-1:0] wr_tag,
  input  logic [NWR-1:0][W-1:0]            wr_data
);
  logic [W-1:0] mem_q [NREG];

  always_comb
    for (int r = 0; r < NRD; r++) rd_data[r] = mem_q[rd_tag[r]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) mem_q[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) mem_q[wr_tag[w]] <= wr_data[w];
    end
  end
endmodule
