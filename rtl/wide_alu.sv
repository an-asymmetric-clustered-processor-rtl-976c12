// wide_alu: one 64b integer ALU of the slow cluster (latency one slow cycle
// in the enclosing pipeline). Same operation set as the narrow ALU plus a
// 64x64 multiply (low 64 bits); LD/ST produce the address base + sign-extended
// 16b offset. Shift amounts are b[5:0]. Purely combinational. The document
// only names these ALUs; the operation set is this design's.
module wide_alu
  import acp_pkg::*;
(
  input  op_e              op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  input  logic [IMM_W-1:0] imm,
  output logic [XLEN-1:0]  y
);
  logic [XLEN-1:0] ix;
  always_comb begin
    ix = XLEN'($signed(imm));
    unique case (op)
      OP_ADD:       y = a + b;
      OP_SUB:       y = a - b;
      OP_AND:       y = a & b;
      OP_OR:        y = a | b;
      OP_XOR:       y = a ^ b;
      OP_SLL:       y = a << b[5:0];
      OP_SRL:       y = a >> b[5:0];
      OP_SRA:       y = XLEN'($signed(a) >>> b[5:0]);
      OP_MUL:       y = a * b;
      OP_ADDI, OP_LD, OP_ST: y = a + ix;
      default:      y = '0;
    endcase
  end
endmodule
