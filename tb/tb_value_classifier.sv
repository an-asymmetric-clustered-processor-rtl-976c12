// tb_value_classifier: directed boundary values and random values; the
// expected type is derived from the signed range of the value and from a
// model Addr file of 8 entries.
`timescale 1ns/1ps
module tb_value_classifier;
  import acp_pkg::*;
  logic [63:0] value; logic [2:0] addr_idx; logic [43:0] addr_upper; logic addr_hit; vtype_e vt;
  value_classifier dut (.*);
  logic [43:0] afile [8]; bit avld [8];
  assign addr_hit = avld[addr_idx] && afile[addr_idx] == addr_upper;
  int checks = 0, failures = 0;
  task automatic t(logic [63:0] v);
    vtype_e e;
    longint sv = longint'(v);
    value = v; #1;
    if (sv >= -(64'sd1 <<< 19) && sv < (64'sd1 <<< 19)) e = VT_SIMPLE;
    else if (avld[v[19:17]] && afile[v[19:17]] == v[63:20]) e = VT_ADDR;
    else e = VT_LONG;
    checks++;
    if (vt !== e) begin failures++; if (failures < 10) $display("FAIL %h got %s exp %s", v, vt.name(), e.name()); end
  endtask
  initial begin
    for (int i = 0; i < 8; i++) begin afile[i] = {$urandom, $urandom}; avld[i] = (i % 3) != 0; end
    t(64'h0); t(64'h7FFFF); t(64'h80000); t(64'hFFFF_FFFF_FFF8_0000); t(64'hFFFF_FFFF_FFF7_FFFF);
    t(-64'sd1);
    for (int i = 0; i < 8; i++) begin
      t({afile[i], 3'(i), 17'h1ABCD});
      t({afile[i] ^ 44'h1, 3'(i), 17'h00123});
    end
    // every power of two, its negation and their neighbours
    for (int k = 0; k < 64; k++)
      for (int d = -2; d <= 2; d++) begin
        t((64'd1 << k) + 64'(d));
        t(-(64'd1 << k) + 64'(d));
      end
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      case (n % 4)
        0: t(v);
        1: t(64'($signed(v[19:0])));
        2: t({afile[v[19:17]], v[19:0]});
        3: t(64'($signed(v[23:0])));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
