// value_classifier: write-back value-type detection.
//
// Decides the register descriptor of a 64b result or load value:
//   Simple - bits [63:19] are all equal, so the low 20 bits sign-extend back
//            to the full value;
//   Addr   - otherwise, if the Addr register selected by the value's PTR
//            field (bits [19:17]) is valid and holds the value's upper 44
//            bits;
//   Long   - everything else.
// The Addr file is read through addr_idx / addr_hit (combinational), in
// parallel with the Simple check, as the document describes. The document
// states the Simple test both as "20 or fewer significant bits" and as "the
// upper 44 bits all 0 or all 1"; the sign-extension form used here is the
// one that keeps the narrow copy exact. Purely combinational.
module value_classifier
  import acp_pkg::*;
(
  input  logic [XLEN-1:0]    value,
  output logic [PTR_W-1:0]   addr_idx,
  output logic [UPPER_W-1:0] addr_upper,
  input  logic               addr_hit,
  output vtype_e             vt
);
  always_comb begin
    addr_idx   = value[NW-1 -: PTR_W];
    addr_upper = value[XLEN-1:NW];
    if (fits_narrow(value))  vt = VT_SIMPLE;
    else if (addr_hit)       vt = VT_ADDR;
    else                     vt = VT_LONG;
  end
endmodule
