// cctag_alu_tag_prop: register-tag propagation through ALU instructions,
// used for direct information-flow tracking. Each of the two register-tag
// bits follows one of two rules (document):
//   ALU_PROP_OR      the result tag is the OR of the source tags for every
//                    arithmetic instruction (taint tracking);
//   ALU_PROP_XOR_AS  the result tag is the XOR of the source tags, for ADD
//                    and SUB only (pointer tracking: pointer+offset stays a
//                    pointer, pointer-pointer is no longer one).
// Anything else writes a zero tag. Which rule drives which bit comes from
// the policies: register-tag bit j belongs to an enabled policy whose mask
// has a set bit at an index i with i mod 2 == j, i.e. the tag bits that
// cover the matching half of an 8-byte word (design choice; the document
// does not say how ALU rules map to register-tag bits). If several policies
// claim a bit the lowest-numbered wins. Immediates carry a zero tag.
// Purely combinational.
module cctag_alu_tag_prop
  import cctag_pkg::*;
(
  input  policy_cfg_t      cfg [NPOL],
  input  alu_cls_e         cls,
  input  logic [RTAGW-1:0] rs1_tag,
  input  logic [RTAGW-1:0] rs2_tag,     // zero for immediate operands
  output logic [RTAGW-1:0] rd_tag,
  output alu_prop_e        bit_rule [RTAGW]
);
  always_comb begin
    for (int j = 0; j < RTAGW; j++) begin
      logic claimed;
      logic [TAGW-1:0] sel;
      claimed = 1'b0;
      bit_rule[j] = ALU_PROP_NONE;
      for (int i = 0; i < TAGW; i++) sel[i] = (i % RTAGW) == j;
      for (int p = 0; p < NPOL; p++)
        if (!claimed && cfg[p].enable && cfg[p].alu_prop != ALU_PROP_NONE && |(cfg[p].mask & sel)) begin
          claimed = 1'b1;
          bit_rule[j] = cfg[p].alu_prop;
        end
      rd_tag[j] = 1'b0;
      unique case (bit_rule[j])
        ALU_PROP_OR:     if (cls != ALU_CLS_NONE) rd_tag[j] = rs1_tag[j] | rs2_tag[j];
        ALU_PROP_XOR_AS: if (cls == ALU_CLS_ADD || cls == ALU_CLS_SUB) rd_tag[j] = rs1_tag[j] ^ rs2_tag[j];
        default:         rd_tag[j] = 1'b0;
      endcase
    end
  end
endmodule
