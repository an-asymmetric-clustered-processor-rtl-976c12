// reg_descriptor: value-type descriptor (RD) of every physical register.
//
// Each register has a 2-bit type (Simple, Long, Addr) and, for Addr, the PTR
// of its Addr register (value bits [19:17]). Reads are combinational (the RF
// READ stage reads RD with the operands). Up to NWR writes per cycle; a later
// port wins on the same register. demote_mask turns every register of type
// Addr whose PTR has its bit set in demote_mask into Long in the cycle: a bit
// is raised
// (one bit per Addr entry) when that entry is freed or replaced, so no register keeps pointing to
// an upper part it no longer has. Writes are applied before the demotion.
// Reset makes every register Simple (all registers reset to 0).
// The type set and its per-register placement follow the document; the
// encoding, the single (narrow-cluster) copy and the demotion are this
// design's choices.
module reg_descriptor
  import acp_pkg::*;
#(
  parameter int NREG = 128,
  parameter int NRD  = 4,
  parameter int NWR  = 6
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NRD-1:0][$clog2(NREG)-1:0]      rd_tag,
  output vtype_e [NRD-1:0]                      rd_vt,
  output logic [NRD-1:0][PTR_W-1:0]             rd_ptr,
  input  logic [NWR-1:0]                        wr_en,
  input  logic [NWR-1:0][$clog2(NREG)-1:0]      wr_tag,
  input  vtype_e [NWR-1:0]                      wr_vt,
  input  logic [NWR-1:0][PTR_W-1:0]             wr_ptr,
  input  logic [NADDR-1:0]                      demote_mask
);
  vtype_e            vt_q  [NREG];
  logic [PTR_W-1:0]  ptr_q [NREG];

  always_comb
    for (int r = 0; r < NRD; r++) begin
      rd_vt[r]  = vt_q[rd_tag[r]];
      rd_ptr[r] = ptr_q[rd_tag[r]];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) begin
        vt_q[i]  <= VT_SIMPLE;
        ptr_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NREG; i++) begin
        vtype_e vt_n;
        logic [PTR_W-1:0] ptr_n;
        vt_n  = vt_q[i];
        ptr_n = ptr_q[i];
        for (int w = 0; w < NWR; w++)
          if (wr_en[w] && wr_tag[w] == i[$clog2(NREG)-1:0]) begin
            vt_n  = wr_vt[w];
            ptr_n = wr_ptr[w];
          end
        if (vt_n == VT_ADDR && demote_mask[ptr_n])
          vt_n = VT_LONG;
        vt_q[i]  <= vt_n;
        ptr_q[i] <= ptr_n;
      end
    end
  end
endmodule
