// cctag_tag_ctrl: the tag control logic. For one memory access it turns the
// configured policies into four 16-bit vectors for the data cache: which
// line-tag bits to check and the value they must hold, which to update and
// the value to write. It also says which bits of the memory tag a load
// copies into the destination register tag.
//
// Per policy p the final mask is
//   m_p = (policy enabled and enabled on this page) ? access_mask & policy_mask : 0
// Every rule reduces to "optionally require 0/1" and "optionally write 0/1":
//   MT_CHECK_EQUAL   check m_p, expect the pointer tag repeated to 16 bits
//   MT_CHECK_UNCOND  check m_p, expect the configured check value
//   MT_CHECK_COND    check m_p & repeated pointer tag, expect the check value
//   S_SET / S_UNSET  update m_p with ones / zeros
//   S_PROP           update m_p with the register tag repeated to 16 bits
//   L_PROP           copy m_p from memory to the register tag on loads
// The per-policy results are OR-combined; policies are expected to use
// disjoint masks on a page (the kernel rejects overlaps). All of this follows
// the document. Repeating the 2-bit register tag eight times for S_PROP is
// this design's choice, mirroring how the 8-bit pointer tag is repeated.
// Memory tags change only on stores. Purely combinational.
module cctag_tag_ctrl
  import cctag_pkg::*;
(
  input  policy_cfg_t          cfg [NPOL],
  input  logic [NPOL-1:0]      page_bitmap,   // from the TLB entry
  input  logic                 is_store,
  input  logic [LINE_OFFW-1:0] off,           // byte offset in the line
  input  logic [1:0]           size_log2,
  input  logic [PTAGW-1:0]     ptr_tag,       // pointer bits 55..48
  input  logic [RTAGW-1:0]     src_rtag,      // tag of the stored register
  output logic [TAGW-1:0]      chk_mask,
  output logic [TAGW-1:0]      chk_val,
  output logic [TAGW-1:0]      upd_mask,
  output logic [TAGW-1:0]      upd_val,
  output logic [TAGW-1:0]      lprop_mask,    // bits copied to the register tag
  output logic                 needs_tag      // any tag work at all
);
  logic [TAGW-1:0] amask [NPOL];

  for (genvar p = 0; p < NPOL; p++) begin : g_mask
    cctag_access_mask u_am (.off(off), .size_log2(size_log2),
                            .gran_log2(cfg[p].gran_log2), .mask(amask[p]));
  end

  always_comb begin
    logic [TAGW-1:0] m, ptr_rep, rt_rep, ce, cv, ue, uv;
    chk_rule_e r;
    logic      v;
    ptr_rep = {ptr_tag, ptr_tag};
    rt_rep  = {8{src_rtag}};
    chk_mask = '0; chk_val = '0; upd_mask = '0; upd_val = '0; lprop_mask = '0;
    for (int p = 0; p < NPOL; p++) begin
      m  = (cfg[p].enable && page_bitmap[p]) ? (amask[p] & cfg[p].mask) : '0;
      r  = is_store ? cfg[p].st_check     : cfg[p].ld_check;
      v  = is_store ? cfg[p].st_check_val : cfg[p].ld_check_val;
      ce = '0; cv = '0; ue = '0; uv = '0;
      unique case (r)
        MT_CHECK_NONE:   ce = '0;
        MT_CHECK_EQUAL:  begin ce = m;           cv = ptr_rep;   end
        MT_CHECK_UNCOND: begin ce = m;           cv = {TAGW{v}}; end
        MT_CHECK_COND:   begin ce = m & ptr_rep; cv = {TAGW{v}}; end
      endcase
      if (is_store) begin
        unique case (cfg[p].st_update)
          S_NONE:  ue = '0;
          S_SET:   begin ue = m; uv = '1;     end
          S_UNSET: begin ue = m; uv = '0;     end
          S_PROP:  begin ue = m; uv = rt_rep; end
        endcase
      end else if (cfg[p].l_prop) begin
        lprop_mask |= m;
      end
      chk_mask |= ce;
      chk_val  |= ce & cv;
      upd_mask |= ue;
      upd_val  |= ue & uv;
    end
    needs_tag = |{chk_mask, upd_mask, lprop_mask};
  end
endmodule
