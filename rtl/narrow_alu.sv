// narrow_alu: the 20b ALU of the fast cluster.
//
// Operands are the 20b Simple copies of 64b registers (sign-extended values).
// y is the low 20 bits of the result; ovf is raised whenever the 64b result
// would not be the sign extension of y, which is the fast cluster's
// mis-prediction condition:
//   ADD/SUB/ADDI  signed 20b overflow
//   AND/OR/XOR    never
//   SLL           bits shifted out differ from the sign, or shift >= 20 with a != 0
//   SRL           a negative (a 64b logical shift would give a large positive value)
//   SRA           never
//   MUL           always (the narrow cluster has no multiplier)
//   LD/ST         address = base + sign-extended 16b offset. With a Simple
//                 base, signed overflow as for ADD. With an Addr base
//                 (a_is_addr) the low 20 bits are added unsigned and any
//                 carry or borrow out of bit 19 flags overflow: the upper part
//                 held in the Addr register would change.
// Shift amounts are b[5:0], as in the 64b ISA. Purely combinational.
// The overflow rule for Addr bases follows the document; the operation set is
// this design's.
module narrow_alu
  import acp_pkg::*;
(
  input  op_e             op,
  input  logic [NW-1:0]   a,
  input  logic [NW-1:0]   b,
  input  logic [IMM_W-1:0] imm,
  input  logic            a_is_addr,
  output logic [NW-1:0]   y,
  output logic            ovf
);
  logic [NW:0]   ax, bx, ix, s;
  logic [5:0]    sh;
  logic [NW-1:0] back;

  always_comb begin
    ax   = {a[NW-1], a};
    bx   = {b[NW-1], b};
    ix   = (NW+1)'($signed(imm));
    sh   = b[5:0];
    s    = '0;
    y    = '0;
    ovf  = 1'b0;
    back = '0;
    unique case (op)
      OP_ADD:  begin s = ax + bx; y = s[NW-1:0]; ovf = s[NW] != s[NW-1]; end
      OP_SUB:  begin s = ax - bx; y = s[NW-1:0]; ovf = s[NW] != s[NW-1]; end
      OP_ADDI: begin s = ax + ix; y = s[NW-1:0]; ovf = s[NW] != s[NW-1]; end
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL: begin
        if (sh >= 6'(NW)) begin
          y   = '0;
          ovf = (a != '0);
        end else begin
          y    = a << sh;
          back = NW'($signed(y) >>> sh);
          ovf  = (back != a);
        end
      end
      OP_SRL: begin
        y   = (sh >= 6'(NW)) ? '0 : (a >> sh);
        ovf = a[NW-1] && (sh != '0);
      end
      OP_SRA:  y = NW'($signed(a) >>> sh);
      OP_MUL:  ovf = 1'b1;
      OP_LD, OP_ST: begin
        if (a_is_addr) begin
          s   = {1'b0, a} + ix;
          y   = s[NW-1:0];
          ovf = s[NW];
        end else begin
          s   = ax + ix;
          y   = s[NW-1:0];
          ovf = s[NW] != s[NW-1];
        end
      end
      default: ovf = 1'b1;
    endcase
  end
endmodule
