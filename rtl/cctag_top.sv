// cctag_top: the CCTAG tag unit that extends an in-order core's memory path.
//
// It brings together the parts that give every memory access its tag work:
//   * cctag_policy_csr    the four policies, written by the kernel;
//   * cctag_tlb           translation plus the per-page policy bitmap;
//   * cctag_ptr_tag       pointer tag (bits 55..48) and Top-Bits-Ignore;
//   * cctag_tag_ctrl      per-policy masks and rules -> check/update vectors;
//   * cctag_l1_tags       the 16-bit tag, tag-valid and tag-dirty bits of
//                         each data-cache line;
//   * cctag_tag_check     masked compare and masked update on the line tag;
//   * cctag_regtag_file   2-bit register tags; cctag_alu_tag_prop for ALU ops;
//   * cctag_data_tagger   tag backing store access through the tag cache.
//
// Memory port: one request at a time (the document's prototype uses a
// blocking cache in step with the pipeline). A request is translated, the
// line is looked up, and the tag work is done on a hit:
//   LOAD/STORE  policy checks; a mismatch answers resp_fault and changes
//               nothing; stores apply the update rules; loads write the
//               destination register tag (propagated bits or zero).
//   LDP/SDP     as LOAD/STORE, but the 2 tag bits of the addressed 8-byte
//               word always move to/from the register tag.
//   MTRD/MTWD/MTSD/MTCD  read/write/set/clear the 2 tag bits of the word.
//   MTR/MTW     read/write the whole 16-bit line tag.
// Explicit tag instructions bypass the policy checks. A TLB miss answers
// resp_tlb_miss at once; the core's page-table walker refills the TLB
// through the refill port and the access is replayed.
// L1 miss: a dirty line tag of the victim is written back first (tag only).
// The fill fetches data and, only when the access needs tag work, the tag;
// otherwise the line is installed with tag-valid clear. MTW writes every tag
// bit, so its fill skips the tag fetch. A hit on a line whose tag is not
// valid fetches the tag alone before the work is done.
//
// perf_evt pulses once per event so that hardware counters can measure
// TLB, L1-tag and tag-cache behaviour.
// Address bits 63..39 left after Top-Bits-Ignore are not used here: Sv39
// canonical-address checking belongs to the host core. pt_result differs
// from pt_ptr only in bits 55..48; its other bits are the input unchanged.
//
// Latency: an L1 hit answers in 3 cycles after acceptance (translate,
// lookup+work, respond); misses add the data-tagger round trips. The data
// array, the core pipeline and the page-table walker are the host's; their
// connections appear here as ports. The document gives the blocks and their
// rules; the port protocol, state machine and timing are this design's.
module cctag_top
  import cctag_pkg::*;
#(
  parameter int unsigned       L1_SETS     = 256,
  parameter int unsigned       TLB_ENTRIES = 32,
  parameter int unsigned       TC_SETS     = 8,
  parameter logic [PADDRW-1:0] TAG_BASE    = 32'hF800_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // supervisor CSR access
  input  logic                  csr_we,
  input  logic [11:0]           csr_addr,
  input  logic [63:0]           csr_wdata,
  output logic [63:0]           csr_rdata,
  // TLB refill from the page-table walker, and sfence.vma
  input  logic                  refill_valid,
  input  logic [VPNW-1:0]       refill_vpn,
  input  logic [PPNW-1:0]       refill_ppn,
  input  logic [NPOL-1:0]       refill_bitmap,
  input  logic                  tlb_flush,
  // memory-stage requests
  input  logic                  req_valid,
  output logic                  req_ready,
  input  mem_op_e               req_op,
  input  logic [63:0]           req_ptr,       // tagged pointer
  input  logic [1:0]            req_size,      // log2 bytes
  input  logic [4:0]            req_reg,       // load destination / store source
  input  logic [TAGW-1:0]       req_val,       // operand of mt* instructions
  output logic                  resp_valid,
  output logic                  resp_fault,    // tag-check exception
  output logic [TAGW-1:0]       resp_bad_bits,
  output logic                  resp_tlb_miss,
  output logic [TAGW-1:0]       resp_rdata,    // mtr / mtrd result
  // one-cycle event pulses for performance counters:
  // [0] TLB miss, [1] tag work done in L1, [2] fill with tag, [3] fill
  // without tag, [4] tag-only fetch, [5] tag write-back, [6] tag-cache
  // hit, [7] tag-cache miss
  output logic [7:0]            perf_evt,
  // register-tag instructions (rtr/rtw/rts/rtc)
  input  logic                  rt_en,
  input  rt_op_e                rt_op,
  input  logic [4:0]            rt_reg,
  input  logic [RTAGW-1:0]      rt_val,
  output logic [RTAGW-1:0]      rt_rdata,
  // ALU result tag write-back
  input  logic                  alu_en,
  input  alu_cls_e              alu_cls,
  input  logic [4:0]            alu_rs1,
  input  logic [4:0]            alu_rs2,
  input  logic                  alu_rs2_imm,
  input  logic [4:0]            alu_rd,
  // pointer-tag instructions (ptw/pts/ptc)
  input  pt_op_e                pt_op,
  input  logic [63:0]           pt_ptr,
  input  logic [PTAGW-1:0]      pt_val,
  output logic [63:0]           pt_result,
  // data memory (host bus)
  output logic                  dmem_valid,
  input  logic                  dmem_ready,
  output logic                  dmem_we,
  output logic [LADDRW-1:0]     dmem_laddr,
  input  logic                  dmem_done,
  // tag memory (reserved DRAM region)
  output logic                  tmem_valid,
  input  logic                  tmem_ready,
  output logic                  tmem_we,
  output logic [LADDRW-1:0]     tmem_addr,
  output logic [TLINE_BITS-1:0] tmem_wdata,
  input  logic                  tmem_rvalid,
  input  logic [TLINE_BITS-1:0] tmem_rdata
);
  typedef enum logic [2:0] {
    S_IDLE, S_XLATE, S_L1, S_WB, S_FETCH, S_RESP
  } state_e;
  state_e state_q;

  // ---------------- policy CSRs and register-tag save CSR ----------------
  policy_cfg_t cfg [NPOL];
  logic [63:0] pol_rdata, rtag_all;
  logic        pol_hit;

  cctag_policy_csr u_csr (
    .clk, .rst_n, .csr_we, .csr_addr, .csr_wdata,
    .csr_rdata(pol_rdata), .csr_hit(pol_hit), .cfg(cfg)
  );
  assign csr_rdata = pol_hit ? pol_rdata : (csr_addr == CSR_RTAGSAVE) ? rtag_all : '0;

  // ---------------- latched request ----------------
  mem_op_e               op_q;
  logic [1:0]            size_q;
  logic [4:0]            reg_q;
  logic [TAGW-1:0]       val_q;
  logic [PPNW-1:0]       ppn_q;
  logic [NPOL-1:0]       bitmap_q;

  // ---------------- pointer tag ----------------
  logic [PTAGW-1:0] ptag_q, req_ptag;
  logic [63:0]      req_addr;
  logic [VADDRW-1:0] addr_q;

  cctag_ptr_tag u_ptr_mem (.ptr(req_ptr), .op(PT_NONE), .operand('0),
                           .tag(req_ptag), .addr(req_addr), .result());
  cctag_ptr_tag u_ptr_ins (.ptr(pt_ptr), .op(pt_op), .operand(pt_val),
                           .tag(), .addr(), .result(pt_result));

  // ---------------- TLB ----------------
  logic            tlb_hit;
  logic [PPNW-1:0] tlb_ppn;
  logic [NPOL-1:0] tlb_bitmap;

  cctag_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n, .lk_vpn(addr_q[VADDRW-1:PGOFFW]), .lk_hit(tlb_hit), .lk_ppn(tlb_ppn),
    .lk_bitmap(tlb_bitmap), .refill_valid, .refill_vpn, .refill_ppn, .refill_bitmap,
    .flush(tlb_flush)
  );

  logic [PADDRW-1:0]    paddr;
  logic [LADDRW-1:0]    laddr;
  logic [LINE_OFFW-1:0] off;
  assign paddr = {ppn_q, addr_q[PGOFFW-1:0]};
  assign laddr = paddr[PADDRW-1:LINE_OFFW];
  assign off   = paddr[LINE_OFFW-1:0];

  // ---------------- register tags ----------------
  logic [RTAGW-1:0] src_rtag, alu_t1, alu_t2, alu_tag;
  logic             wb_en;
  logic [4:0]       wb_reg;
  logic [RTAGW-1:0] wb_tag;
  logic             ld_wb_en;
  logic [RTAGW-1:0] ld_wb_tag;

  assign src_rtag = rtag_all[RTAGW*reg_q +: RTAGW];

  cctag_regtag_file u_rtag (
    .clk, .rst_n, .ra1(alu_rs1), .rd1(alu_t1), .ra2(alu_rs2), .rd2(alu_t2),
    .wb_en, .wb_reg, .wb_tag, .rt_en, .rt_op, .rt_reg, .rt_val, .rt_rdata,
    .csr_we(csr_we && csr_addr == CSR_RTAGSAVE), .csr_wdata, .csr_rdata(rtag_all)
  );

  cctag_alu_tag_prop u_alu (
    .cfg(cfg), .cls(alu_cls), .rs1_tag(alu_t1), .rs2_tag(alu_rs2_imm ? '0 : alu_t2),
    .rd_tag(alu_tag), .bit_rule()
  );

  // A load completing its tag work has the write port; the core does not
  // retire an ALU result in the same cycle (blocking memory stage).
  assign wb_en  = ld_wb_en || alu_en;
  assign wb_reg = ld_wb_en ? reg_q : alu_rd;
  assign wb_tag = ld_wb_en ? ld_wb_tag : alu_tag;

  // ---------------- tag control ----------------
  logic            is_load, is_store, is_explicit;
  logic [TAGW-1:0] c_mask, c_val, u_mask, u_val, lp_mask;
  logic            pol_need;

  assign is_load     = (op_q == OP_LOAD)  || (op_q == OP_LDP);
  assign is_store    = (op_q == OP_STORE) || (op_q == OP_SDP);
  assign is_explicit = !is_load && !is_store;

  cctag_tag_ctrl u_ctrl (
    .cfg(cfg), .page_bitmap(bitmap_q), .is_store(is_store), .off(off), .size_log2(size_q),
    .ptr_tag(ptag_q), .src_rtag(src_rtag), .chk_mask(c_mask), .chk_val(c_val),
    .upd_mask(u_mask), .upd_val(u_val), .lprop_mask(lp_mask), .needs_tag(pol_need)
  );

  // Tag bits of the addressed 8-byte word.
  logic [3:0]      wsel;
  logic [TAGW-1:0] wmask;
  assign wsel  = 4'(off[LINE_OFFW-1:3]);
  assign wmask = TAGW'(2'b11) << (2 * wsel);

  logic need_tag, full_write;
  assign full_write = (op_q == OP_MTW);
  assign need_tag   = is_explicit || (op_q == OP_LDP) || (op_q == OP_SDP) || pol_need;

  // ---------------- L1 line tags ----------------
  logic              lk_hit, lk_tv, lk_td, vic_valid, vic_td;
  logic [1:0]        lk_way, vic_way;
  logic [TAGW-1:0]   lk_tag, vic_tag;
  logic [LADDRW-1:0] vic_laddr;
  logic              l1_wr_en, l1_wr_tv, l1_wr_td, l1_touch;
  logic [1:0]        l1_wr_way;
  logic [TAGW-1:0]   l1_wr_tag;

  cctag_l1_tags #(.SETS(L1_SETS)) u_l1 (
    .clk, .rst_n, .lk_laddr(laddr), .lk_hit, .lk_way, .lk_tag, .lk_tv, .lk_td,
    .vic_way, .vic_valid, .vic_laddr, .vic_tag, .vic_td,
    .wr_en(l1_wr_en), .wr_laddr(laddr), .wr_way(l1_wr_way), .wr_tag(l1_wr_tag),
    .wr_tv(l1_wr_tv), .wr_td(l1_wr_td),
    .touch_en(l1_touch), .touch_laddr(laddr), .touch_way(lk_way)
  );

  // ---------------- the tag operation itself ----------------
  logic [TAGW-1:0] op_cmask, op_cval, op_umask, op_uval;
  logic            mismatch, do_write;
  logic [TAGW-1:0] bad_bits, new_tag;
  logic [TAGW-1:0] rep_val;

  assign rep_val = {8{val_q[RTAGW-1:0]}};

  always_comb begin
    op_cmask = '0; op_cval = '0; op_umask = '0; op_uval = '0;
    unique case (op_q)
      OP_LOAD, OP_STORE, OP_LDP: begin
        op_cmask = c_mask; op_cval = c_val; op_umask = u_mask; op_uval = u_val;
      end
      OP_SDP: begin
        op_cmask = c_mask; op_cval = c_val;
        op_umask = u_mask | wmask;
        op_uval  = (u_val & ~wmask) | ({8{src_rtag}} & wmask);
      end
      OP_MTWD: begin op_umask = wmask; op_uval = rep_val; end
      OP_MTSD: begin op_umask = wmask & rep_val; op_uval = '1; end
      OP_MTCD: begin op_umask = wmask & rep_val; op_uval = '0; end
      OP_MTW:  begin op_umask = '1; op_uval = val_q; end
      default: ;
    endcase
  end

  cctag_tag_check u_chk (
    .cur_tag(lk_tag), .chk_mask(op_cmask), .chk_val(op_cval), .upd_mask(op_umask),
    .upd_val(op_uval), .mismatch, .bad_bits, .new_tag, .do_write
  );

  // ---------------- data tagger ----------------
  logic              dt_req_valid, dt_req_ready, dt_we, dt_need_tag, dt_need_data;
  logic [LADDRW-1:0] dt_laddr;
  logic [TAGW-1:0]   dt_wtag;
  logic              dt_resp_valid, dt_resp_tag_hit;
  logic [TAGW-1:0]   dt_resp_tag;
  logic              dt_sent_q;

  cctag_data_tagger #(.TAG_BASE(TAG_BASE), .TC_SETS(TC_SETS)) u_dt (
    .clk, .rst_n,
    .req_valid(dt_req_valid), .req_ready(dt_req_ready), .req_we(dt_we), .req_laddr(dt_laddr),
    .req_need_tag(dt_need_tag), .req_need_data(dt_need_data), .req_tag(dt_wtag),
    .resp_valid(dt_resp_valid), .resp_tag(dt_resp_tag), .resp_tag_hit(dt_resp_tag_hit),
    .dmem_valid, .dmem_ready, .dmem_we, .dmem_laddr, .dmem_done,
    .tmem_valid, .tmem_ready, .tmem_we, .tmem_addr, .tmem_wdata, .tmem_rvalid, .tmem_rdata
  );

  // S_WB: write back the victim's dirty tag. S_FETCH: fill the line (data,
  // and the tag when needed) or, on a hit with an invalid tag, the tag alone.
  logic fetch_tag_only;   // latched: the line is present, only its tag is missing
  logic fetch_tag;        // latched: the fill includes the tag

  assign dt_req_valid = ((state_q == S_WB) || (state_q == S_FETCH)) && !dt_sent_q;
  assign dt_we        = (state_q == S_WB);
  assign dt_laddr     = (state_q == S_WB) ? vic_laddr : laddr;
  assign dt_need_tag  = (state_q == S_WB) ? 1'b1 : fetch_tag;
  assign dt_need_data = (state_q == S_WB) ? 1'b0 : !fetch_tag_only;
  assign dt_wtag      = vic_tag;

  // ---------------- control ----------------
  logic l1_ready;   // line present with a usable tag (or no tag needed)
  assign l1_ready = lk_hit && (lk_tv || !need_tag || full_write);

  always_comb begin
    l1_wr_en = 1'b0; l1_wr_way = lk_way; l1_wr_tag = lk_tag; l1_wr_tv = lk_tv; l1_wr_td = lk_td;
    l1_touch = 1'b0;
    ld_wb_en = 1'b0; ld_wb_tag = '0;
    if (state_q == S_L1 && l1_ready) begin
      l1_touch = 1'b1;
      if (do_write) begin
        l1_wr_en = 1'b1; l1_wr_tag = new_tag; l1_wr_tv = 1'b1; l1_wr_td = 1'b1;
      end
      if (is_load && !mismatch) begin
        ld_wb_en  = 1'b1;
        ld_wb_tag = (op_q == OP_LDP) ? RTAGW'(lk_tag >> (2 * wsel))
                                     : RTAGW'((lk_tag & lp_mask) >> (2 * wsel));
      end
    end
    if (state_q == S_FETCH && dt_resp_valid) begin
      l1_wr_en  = 1'b1;
      l1_wr_way = fetch_tag_only ? lk_way : vic_way;
      l1_wr_tag = fetch_tag ? dt_resp_tag : '0;
      l1_wr_tv  = fetch_tag;
      l1_wr_td  = 1'b0;
    end
  end

  assign req_ready = (state_q == S_IDLE);

  logic dt_acc;
  assign dt_acc   = dt_req_valid && dt_req_ready;
  assign perf_evt = {dt_resp_valid && dt_need_tag && !dt_resp_tag_hit,
                     dt_resp_valid && dt_resp_tag_hit,
                     dt_acc && dt_we,
                     dt_acc && !dt_we && !dt_need_data,
                     dt_acc && !dt_we && dt_need_data && !dt_need_tag,
                     dt_acc && !dt_we && dt_need_data && dt_need_tag,
                     state_q == S_L1 && l1_ready,
                     state_q == S_XLATE && !tlb_hit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q <= OP_LOAD; addr_q <= '0; ptag_q <= '0; size_q <= '0; reg_q <= '0;
      val_q <= '0; ppn_q <= '0; bitmap_q <= '0;
      dt_sent_q <= 1'b0; fetch_tag_only <= 1'b0; fetch_tag <= 1'b0;
      resp_valid <= 1'b0; resp_fault <= 1'b0; resp_bad_bits <= '0; resp_tlb_miss <= 1'b0;
      resp_rdata <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (dt_req_valid && dt_req_ready) dt_sent_q <= 1'b1;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          op_q <= req_op; addr_q <= req_addr[VADDRW-1:0]; ptag_q <= req_ptag;
          size_q <= req_size; reg_q <= req_reg; val_q <= req_val;
          resp_fault <= 1'b0; resp_bad_bits <= '0; resp_tlb_miss <= 1'b0; resp_rdata <= '0;
          state_q <= S_XLATE;
        end
        S_XLATE: begin
          if (tlb_hit) begin
            ppn_q <= tlb_ppn; bitmap_q <= tlb_bitmap;
            state_q <= S_L1;
          end else begin
            resp_tlb_miss <= 1'b1;
            state_q <= S_RESP;
          end
        end
        S_L1: begin
          dt_sent_q <= 1'b0;
          if (l1_ready) begin
            resp_fault    <= mismatch && !is_explicit;
            resp_bad_bits <= is_explicit ? '0 : bad_bits;
            resp_rdata    <= (op_q == OP_MTR)  ? lk_tag :
                             (op_q == OP_MTRD) ? TAGW'(lk_tag[2*wsel +: 2]) : '0;
            state_q <= S_RESP;
          end else if (lk_hit) begin
            fetch_tag_only <= 1'b1; fetch_tag <= 1'b1;
            state_q <= S_FETCH;
          end else begin
            fetch_tag_only <= 1'b0; fetch_tag <= need_tag && !full_write;
            state_q <= (vic_valid && vic_td) ? S_WB : S_FETCH;
          end
        end
        S_WB: if (dt_resp_valid) begin
          dt_sent_q <= 1'b0;
          state_q <= S_FETCH;
        end
        S_FETCH: if (dt_resp_valid) begin
          dt_sent_q <= 1'b0;
          state_q <= S_L1;
        end
        S_RESP: begin
          resp_valid <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_one_wb: assert property (@(posedge clk) disable iff (!rst_n) !(ld_wb_en && alu_en))
    else $error("cctag_top: load and ALU tag write-back collide");
`endif
endmodule
