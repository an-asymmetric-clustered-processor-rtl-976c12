// steer_unit: final cluster assignment of a renamed instruction.
//
// The predictor bit read at fetch is re-checked against the register
// descriptors of those source operands that are already available: a narrow
// prediction is changed to wide if any ready source is Long. Beyond that rule
// from the document, this design also sends wide: a non-memory operation with
// an Addr-type ready source and a Ld/St whose store data is not Simple (the
// narrow ALU cannot produce those 64b results), and every MUL. A Ld/St whose
// base register is Addr stays narrow: that is the case the Addr file exists
// for. Sources that are not yet ready cannot be checked and are trusted to the
// prediction. Purely combinational.
module steer_unit
  import acp_pkg::*;
(
  input  logic   pred_narrow,
  input  op_e    op,
  input  logic   s1_v,
  input  logic   s1_ready,
  input  vtype_e s1_vt,
  input  logic   s2_v,
  input  logic   s2_ready,
  input  vtype_e s2_vt,
  output logic   to_narrow,
  output logic   corrected     // prediction was narrow and got overridden
);
  logic s1_bad, s2_bad;

  always_comb begin
    s1_bad = 1'b0;
    s2_bad = 1'b0;
    if (s1_v && s1_ready)
      s1_bad = (s1_vt == VT_LONG) || (!is_mem(op) && s1_vt == VT_ADDR);
    if (s2_v && s2_ready)
      s2_bad = (s2_vt != VT_SIMPLE);
    to_narrow = pred_narrow && (op != OP_MUL) && !s1_bad && !s2_bad;
    corrected = pred_narrow && !to_narrow;
  end
endmodule
