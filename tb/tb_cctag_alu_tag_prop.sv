// Self-checking test of cctag_alu_tag_prop. Bit 0 is given to a taint policy
// (OR rule, even mask bits) and bit 1 to a pointer-tracking policy (XOR on
// ADD/SUB, odd mask bits); every class and tag pair is compared with the
// rule, then the policies are disabled and the result must be zero.
// The OR and XOR rules follow the document; the mapping of register-tag
// bits to policies is this design's own and is checked as such.
module tb_cctag_alu_tag_prop;
  import cctag_pkg::*;
  policy_cfg_t cfg [NPOL];
  alu_cls_e cls; logic [1:0] rs1_tag, rs2_tag, rd_tag; alu_prop_e bit_rule [RTAGW];
  int checks = 0, failures = 0;

  cctag_alu_tag_prop dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < NPOL; p++) cfg[p] = POL_OFF;
    cfg[1].enable = 1; cfg[1].mask = 16'h0001; cfg[1].alu_prop = ALU_PROP_OR;
    cfg[3].enable = 1; cfg[3].mask = 16'h0002; cfg[3].alu_prop = ALU_PROP_XOR_AS;
    for (int c = 0; c < 4; c++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          logic [1:0] e;
          cls = alu_cls_e'(c); rs1_tag = 2'(a); rs2_tag = 2'(b); #1;
          e[0] = (c != 3) ? (rs1_tag[0] | rs2_tag[0]) : 1'b0;
          e[1] = (c == 0 || c == 1) ? (rs1_tag[1] ^ rs2_tag[1]) : 1'b0;
          checks++;
          if (rd_tag !== e) begin failures++; $display("FAIL cls=%0d a=%0d b=%0d got %b exp %b", c, a, b, rd_tag, e); end
        end
    checks++; if (bit_rule[0] != ALU_PROP_OR || bit_rule[1] != ALU_PROP_XOR_AS) failures++;
    cfg[1].enable = 0; cfg[3].enable = 0;
    cls = ALU_CLS_ADD; rs1_tag = 2'b11; rs2_tag = 2'b00; #1;
    checks++; if (rd_tag !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
