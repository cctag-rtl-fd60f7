// Self-checking test of cctag_tag_ctrl. A bit-level reference decides, for
// every tag bit and policy, whether it lies in the accessed granule, whether
// it is checked and what it must hold. Random configurations and accesses
// are compared, then the three-policy example of the document (MTE-like heap
// colouring, stack return-address protection, a policy on all data) is
// replayed with fixed expectations.
module tb_cctag_tag_ctrl;
  import cctag_pkg::*;
  policy_cfg_t cfg [NPOL];
  logic [NPOL-1:0] page_bitmap;
  logic is_store;
  logic [5:0] off; logic [1:0] size_log2;
  logic [7:0] ptr_tag; logic [1:0] src_rtag;
  logic [15:0] chk_mask, chk_val, upd_mask, upd_val, lprop_mask;
  logic needs_tag;
  int checks = 0, failures = 0;

  cctag_tag_ctrl dut (.*);

  // Reference: bit i of the line tag covers bytes 4i..4i+3.
  task automatic reference(output logic [15:0] cm, cv, um, uv, lm);
    cm = '0; cv = '0; um = '0; uv = '0; lm = '0;
    for (int p = 0; p < NPOL; p++) begin
      int g = (cfg[p].gran_log2 > size_log2) ? int'(cfg[p].gran_log2) : int'(size_log2);
      int blk;
      if (g < 2) g = 2;
      blk = int'(off) >> g;
      for (int i = 0; i < 16; i++) begin
        bit in_blk = ((i*4) >> g) == blk;
        bit own = cfg[p].enable && page_bitmap[p] && cfg[p].mask[i] && in_blk;
        chk_rule_e r = is_store ? cfg[p].st_check : cfg[p].ld_check;
        bit v = is_store ? cfg[p].st_check_val : cfg[p].ld_check_val;
        bit pbit = ptr_tag[i % 8];
        if (!own) continue;
        if (r == MT_CHECK_EQUAL) begin cm[i] = 1; cv[i] = pbit; end
        if (r == MT_CHECK_UNCOND) begin cm[i] = 1; cv[i] = v; end
        if (r == MT_CHECK_COND && pbit) begin cm[i] = 1; cv[i] = v; end
        if (is_store) begin
          if (cfg[p].st_update == S_SET)   begin um[i] = 1; uv[i] = 1; end
          if (cfg[p].st_update == S_UNSET) begin um[i] = 1; uv[i] = 0; end
          if (cfg[p].st_update == S_PROP)  begin um[i] = 1; uv[i] = src_rtag[i % 2]; end
        end else if (cfg[p].l_prop) lm[i] = 1;
      end
    end
  endtask

  task automatic compare(input string tag);
    logic [15:0] cm, cv, um, uv, lm;
    #1; reference(cm, cv, um, uv, lm);
    checks++;
    if ({chk_mask, chk_val, upd_mask, upd_val, lprop_mask} !== {cm, cv, um, uv, lm}
        || needs_tag !== |{cm, um, lm}) begin
      failures++;
      $display("FAIL %s: got %h %h %h %h %h exp %h %h %h %h %h", tag,
               chk_mask, chk_val, upd_mask, upd_val, lprop_mask, cm, cv, um, uv, lm);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // Random, with disjoint policy masks as the kernel guarantees.
    for (int it = 0; it < 3000; it++) begin
      logic [15:0] owner;
      owner = '0;
      for (int p = 0; p < NPOL; p++) begin
        cfg[p] = policy_cfg_t'($urandom);
        cfg[p].gran_log2 = 3'($urandom_range(6, 2));
        cfg[p].alu_prop = ALU_PROP_NONE;
      end
      for (int i = 0; i < 16; i++) begin
        int p = $urandom_range(NPOL);   // NPOL = unowned
        for (int q = 0; q < NPOL; q++) cfg[q].mask[i] = (p == q);
      end
      page_bitmap = 4'($urandom); is_store = 1'($urandom);
      size_log2 = 2'($urandom); off = 6'($urandom) & ~((6'd1 << size_log2) - 6'd1);
      ptr_tag = 8'($urandom); src_rtag = 2'($urandom);
      compare("random");
    end
    // Document scenario: policy 0 heap colouring (4 bits per 32 B, even bits),
    // policy 1 return-address protection (1 bit per 8 B, even bits, stack pages),
    // policy 2 (1 bit per 8 B, odd bits) on all data pages.
    cfg[0] = '{enable:1, mask:16'h5555, gran_log2:3'd5, ld_check:MT_CHECK_EQUAL, ld_check_val:0,
               st_check:MT_CHECK_EQUAL, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
    cfg[1] = '{enable:1, mask:16'h5555, gran_log2:3'd3, ld_check:MT_CHECK_UNCOND, ld_check_val:0,
               st_check:MT_CHECK_UNCOND, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
    cfg[2] = '{enable:1, mask:16'hAAAA, gran_log2:3'd3, ld_check:MT_CHECK_COND, ld_check_val:1,
               st_check:MT_CHECK_NONE, st_check_val:0, l_prop:0, st_update:S_UNSET, alu_prop:ALU_PROP_NONE};
    cfg[3] = POL_OFF;
    // Heap page (policies 0 and 2), 8-byte load at offset 40 with colour 0x35.
    page_bitmap = 4'b0101; is_store = 0; off = 6'd40; size_log2 = 2'd3; ptr_tag = 8'h35; src_rtag = 0;
    compare("heap load");
    checks++; if (chk_mask !== 16'h5500 || chk_val !== 16'h1500) begin
      failures++; $display("FAIL heap load fixed: %h %h", chk_mask, chk_val); end
    // Stack page (policies 1 and 2), 8-byte store at offset 24.
    page_bitmap = 4'b0110; is_store = 1; off = 6'd24; ptr_tag = 8'h00;
    compare("stack store");
    checks++; if (chk_mask !== 16'h0040 || chk_val !== 16'h0000 || upd_mask !== 16'h0080 || upd_val !== 16'h0) begin
      failures++; $display("FAIL stack store fixed: %h %h %h %h", chk_mask, chk_val, upd_mask, upd_val); end
    // Disabled page: nothing to do.
    page_bitmap = 4'b0000; compare("no page"); checks++; if (needs_tag) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
