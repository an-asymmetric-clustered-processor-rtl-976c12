// tb_wide_alu: random 64b operations compared with an arithmetic model
// (shifts written as multiplications and divisions by powers of two).
`timescale 1ns/1ps
module tb_wide_alu;
  import acp_pkg::*;
  op_e op; logic [63:0] a, b, y; logic [15:0] imm;
  wide_alu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] e;
      logic [127:0] p2;
      logic [63:0] na;
      op = op_e'($urandom % 12);
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; imm = 16'($urandom);
      p2 = 128'(1) << b[5:0];
      na = ~a;
      case (op)
        OP_ADD: e = a + b;  OP_SUB: e = a + ~b + 1;
        OP_AND: e = ~(~a | ~b);  OP_OR: e = ~(~a & ~b);  OP_XOR: e = (a | b) & ~(a & b);
        OP_SLL: e = 64'(128'(a) * p2);
        OP_SRL: e = 64'(128'(a) / p2);
        OP_SRA: e = a[63] ? ~64'(128'(na) / p2) : 64'(128'(a) / p2);
        OP_MUL: e = 64'(128'(a) * 128'(b));
        default: e = a + {{48{imm[15]}}, imm};
      endcase
      #1;
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL %s %h %h -> %h exp %h", op.name(), a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
