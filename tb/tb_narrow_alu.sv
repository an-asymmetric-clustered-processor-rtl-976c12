// tb_narrow_alu: random operations on narrow operands. The expectation is
// the 64b result of the same operation on the sign-extended operands: y
// must equal its low 20 bits and ovf must be set exactly when the 64b result
// is not the sign extension of y. For Ld/St on an Addr base the base is
// given random upper bits and ovf must be set exactly when the upper 44
// bits of the 64b address differ from the base's.
`timescale 1ns/1ps
module tb_narrow_alu;
  import acp_pkg::*;
  op_e op; logic [19:0] a, b, y; logic [15:0] imm; logic a_is_addr, ovf;
  narrow_alu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 40000; n++) begin
      logic [63:0] A, B, R, I;
      logic [43:0] up;
      bit eovf;
      op = op_e'($urandom % 12);
      a = 20'($urandom); b = 20'($urandom); imm = 16'($urandom);
      if (n % 3 == 0) a = 20'($signed(a[7:0]));
      if (op inside {OP_SLL, OP_SRL, OP_SRA}) b = 20'($urandom % 26);
      a_is_addr = (op inside {OP_LD, OP_ST}) && ($urandom % 2);
      up = {$urandom, $urandom};
      A = a_is_addr ? {up, a} : {{44{a[19]}}, a};
      B = {{44{b[19]}}, b};
      I = {{48{imm[15]}}, imm};
      case (op)
        OP_ADD: R = A + B;  OP_SUB: R = A - B;  OP_AND: R = A & B;
        OP_OR:  R = A | B;  OP_XOR: R = A ^ B;  OP_SLL: R = A << B[5:0];
        OP_SRL: R = A >> B[5:0];  OP_SRA: R = $signed(A) >>> B[5:0];
        OP_MUL: R = A * B;  default: R = A + I;
      endcase
      #1;
      if (a_is_addr) eovf = R[63:20] != up;
      else if (op == OP_MUL) eovf = 1;
      else eovf = R != {{44{R[19]}}, R[19:0]};
      checks++;
      if (ovf !== eovf || (!eovf && y !== R[19:0])) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h imm=%h addr=%b y=%h ovf=%b exp %h/%b", op.name(), a, b, imm, a_is_addr, y, ovf, R, eovf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
