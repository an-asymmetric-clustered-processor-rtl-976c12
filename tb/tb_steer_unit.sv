// tb_steer_unit: exhaustive check of the steering correction over every
// opcode, prediction, readiness and descriptor combination.
`timescale 1ns/1ps
module tb_steer_unit;
  import acp_pkg::*;
  logic pred_narrow, s1_v, s1_ready, s2_v, s2_ready, to_narrow, corrected;
  op_e op; vtype_e s1_vt, s2_vt;
  steer_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int o = 0; o <= int'(OP_ST); o++)
      for (int m = 0; m < 2**9; m++) begin
        bit exp, mem, bad;
        op = op_e'(o);
        {pred_narrow, s1_v, s1_ready, s2_v, s2_ready} = m[4:0];
        s1_vt = vtype_e'(m[6:5] % 3);
        s2_vt = vtype_e'(m[8:7] % 3);
        #1;
        mem = (op == OP_LD || op == OP_ST);
        bad = 0;
        if (s1_v && s1_ready && s1_vt == VT_LONG) bad = 1;           // the paper's rule
        if (s2_v && s2_ready && s2_vt == VT_LONG) bad = 1;
        if (!mem && s1_v && s1_ready && s1_vt == VT_ADDR) bad = 1;  // ALU on an Addr value
        if (s2_v && s2_ready && s2_vt == VT_ADDR) bad = 1;          // 2nd operand always narrow
        if (op == OP_MUL) bad = 1;
        exp = pred_narrow && !bad;
        checks++;
        if (to_narrow !== exp || corrected !== (pred_narrow && !exp)) begin
          failures++;
          if (failures < 10) $display("FAIL op %s m %h got %b", op.name(), m, to_narrow);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
