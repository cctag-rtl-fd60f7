// End-to-end test of cctag_top at its default sizes (256-set L1 tag array,
// 32-entry TLB, 2 KiB tag cache). A behavioural DRAM serves data and tag
// traffic with random delays; a page table maps 40 pages (more than the TLB
// holds) onto physical pages that crowd a quarter of the L1 sets, so
// evictions, dirty tag write-backs and tag-cache misses are frequent.
//
// Four policies reproduce the document's combined protection:
//   P0 heap colouring      4 bits / 32 B, even mask bits, EQUAL check (heap pages)
//   P1 return addresses    1 bit / 8 B, even mask bits, UNCOND check = 0 (stack pages)
//   P2 pointer integrity   1 bit / 8 B, odd mask bits, COND load check = 1,
//                          stores clear the bit, XOR ALU rule (heap and stack pages)
//   P3 information flow    1 bit / 8 B, even mask bits, loads and stores
//                          propagate, OR ALU rule (flow-tracking pages)
// A reference model keeps every line's tag and every register tag and
// predicts fault, read data and new tags of each random operation with a
// bit-by-bit evaluation of the rules. The performance-event port counts each
// mechanism; one that never happens counts as a failure.
// An access that moves nothing to or from memory must answer exactly three
// cycles after it was accepted.
module tb_cctag_top;
  import cctag_pkg::*;

  logic clk = 0, rst_n = 0;
  logic csr_we = 0; logic [11:0] csr_addr = '0; logic [63:0] csr_wdata = '0, csr_rdata;
  logic refill_valid = 0; logic [VPNW-1:0] refill_vpn = '0; logic [PPNW-1:0] refill_ppn = '0;
  logic [NPOL-1:0] refill_bitmap = '0; logic tlb_flush = 0;
  logic req_valid = 0, req_ready; mem_op_e req_op = OP_LOAD; logic [63:0] req_ptr = '0;
  logic [1:0] req_size = '0; logic [4:0] req_reg = '0; logic [15:0] req_val = '0;
  logic resp_valid, resp_fault, resp_tlb_miss; logic [15:0] resp_bad_bits, resp_rdata;
  logic rt_en = 0; rt_op_e rt_op = RT_READ; logic [4:0] rt_reg = '0; logic [1:0] rt_val = '0, rt_rdata;
  logic alu_en = 0; alu_cls_e alu_cls = ALU_CLS_ADD; logic [4:0] alu_rs1 = '0, alu_rs2 = '0, alu_rd = '0;
  logic alu_rs2_imm = 0;
  pt_op_e pt_op = PT_NONE; logic [63:0] pt_ptr = '0, pt_result; logic [7:0] pt_val = '0;
  logic dmem_valid, dmem_ready, dmem_we, dmem_done = 0; logic [LADDRW-1:0] dmem_laddr;
  logic tmem_valid, tmem_ready, tmem_we, tmem_rvalid = 0; logic [LADDRW-1:0] tmem_addr;
  logic [511:0] tmem_wdata, tmem_rdata = '0;
  logic [7:0] perf_evt;

  cctag_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // ---------------- behavioural DRAM ----------------
  logic [511:0] tstore [logic [LADDRW-1:0]];
  assign dmem_ready = 1'b1;
  assign tmem_ready = 1'b1;
  always @(posedge clk) begin
    if (dmem_valid)
      fork begin repeat ($urandom_range(5, 1)) @(posedge clk); dmem_done <= 1; @(posedge clk); dmem_done <= 0; end join_none
    if (tmem_valid) begin
      automatic logic [LADDRW-1:0] a = tmem_addr;
      if (tmem_we) tstore[a] = tmem_wdata;
      else fork begin
        repeat ($urandom_range(6, 2)) @(posedge clk);
        tmem_rdata <= tstore.exists(a) ? tstore[a] : '0; tmem_rvalid <= 1;
        @(posedge clk); tmem_rvalid <= 0;
      end join_none
    end
  end

  // ---------------- mechanism counters ----------------
  int n_tlb_miss = 0, n_l1_hit = 0, n_fill_data_only = 0, n_fill_with_tag = 0, n_tag_only = 0;
  int n_tag_wb = 0, n_full_write_fill = 0, n_tc_hit = 0, n_tc_miss = 0;
  int n_fault_equal = 0, n_fault_uncond = 0, n_fault_cond = 0, n_upd_set_unset = 0, n_upd_prop = 0;
  int n_hit_timed = 0;
  int n_lprop = 0, n_alu_or = 0, n_alu_xor = 0, n_csr_restore = 0, n_ptr_ops = 0, n_pass_checked = 0;

  int n_tlb_evt = 0, n_xfer = 0, cyc = 0;
  bit in_mtw = 0;   // a full-tag write is in flight
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (perf_evt[0]) n_tlb_evt++;
    if (|perf_evt[5:2]) n_xfer++;
    if (perf_evt[1]) n_l1_hit++;
    if (perf_evt[2]) n_fill_with_tag++;
    if (perf_evt[3]) begin n_fill_data_only++; if (in_mtw) n_full_write_fill++; end
    if (perf_evt[4]) n_tag_only++;
    if (perf_evt[5]) n_tag_wb++;
    if (perf_evt[6]) n_tc_hit++;
    if (perf_evt[7]) n_tc_miss++;
  end

  // ---------------- policies ----------------
  policy_cfg_t pol [NPOL];
  function automatic logic [3:0] page_bitmap(input int vpn);
    case (vpn % 4)
      0: return 4'b0101;   // heap: P0 + P2
      1: return 4'b0110;   // stack: P1 + P2
      2: return 4'b1000;   // flow tracking: P3
      default: return 4'b0000;
    endcase
  endfunction
  function automatic int ppn_of(input int vpn); return 256 + vpn * 4; endfunction

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d; @(negedge clk); csr_we = 0;
  endtask

  // ---------------- reference model ----------------
  logic [15:0] mtag [int];      // line tag by physical line address
  logic [1:0]  rtm  [32];
  function automatic logic [15:0] mt(input int l); return mtag.exists(l) ? mtag[l] : 16'h0; endfunction

  typedef struct { bit fault; logic [15:0] newtag; logic [1:0] rtag; bit wr_rtag; logic [15:0] rdata;
                   bit fe, fu, fc, ud, up, lp; } ref_t;

  function automatic ref_t ref_op(input mem_op_e op, input logic [3:0] bm, input int off, input int sz,
                                  input logic [7:0] ptag, input logic [1:0] srt, input logic [15:0] cur,
                                  input logic [15:0] val);
    ref_t r; int w;
    logic [15:0] nt; logic [1:0] lr;
    r = '{fault: 0, newtag: cur, rtag: 0, wr_rtag: 0, rdata: 0, fe: 0, fu: 0, fc: 0, ud: 0, up: 0, lp: 0};
    w = off / 8;
    nt = cur; lr = 0;
    case (op)
      OP_MTRD: begin r.rdata = 16'(cur[2*w +: 2]); return r; end
      OP_MTR:  begin r.rdata = cur; return r; end
      OP_MTWD: begin r.newtag[2*w +: 2] = val[1:0]; return r; end
      OP_MTSD: begin r.newtag[2*w +: 2] = cur[2*w +: 2] | val[1:0]; return r; end
      OP_MTCD: begin r.newtag[2*w +: 2] = cur[2*w +: 2] & ~val[1:0]; return r; end
      OP_MTW:  begin r.newtag = val; return r; end
      default: ;
    endcase
    for (int p = 0; p < NPOL; p++) begin
      bit st; int g; chk_rule_e cr; bit cv;
      if (!pol[p].enable || !bm[p]) continue;
      st = (op == OP_STORE || op == OP_SDP);
      g = int'(pol[p].gran_log2) > sz ? int'(pol[p].gran_log2) : sz;
      cr = st ? pol[p].st_check : pol[p].ld_check;
      cv = st ? pol[p].st_check_val : pol[p].ld_check_val;
      for (int i = 0; i < 16; i++) begin
        if (!pol[p].mask[i] || ((4*i) >> g) != (off >> g)) continue;
        if (cr == MT_CHECK_EQUAL && cur[i] != ptag[i%8]) begin r.fault = 1; r.fe = 1; end
        if (cr == MT_CHECK_UNCOND && cur[i] != cv) begin r.fault = 1; r.fu = 1; end
        if (cr == MT_CHECK_COND && ptag[i%8] && cur[i] != cv) begin r.fault = 1; r.fc = 1; end
        if (st) case (pol[p].st_update)
          S_SET:   begin nt[i] = 1; r.ud = 1; end
          S_UNSET: begin nt[i] = 0; r.ud = 1; end
          S_PROP:  begin nt[i] = srt[i%2]; r.up = 1; end
          default: ;
        endcase
        else if (pol[p].l_prop && (i / 2) == w) begin lr[i%2] = cur[i]; r.lp = r.lp | cur[i]; end
      end
    end
    if (op == OP_SDP) nt[2*w +: 2] = srt;
    if (op == OP_LDP) lr = cur[2*w +: 2];
    if (r.fault) begin r.newtag = cur; return r; end
    r.newtag = nt;
    if (op == OP_LOAD || op == OP_LDP) begin r.wr_rtag = 1; r.rtag = lr; end
    return r;
  endfunction

  // ---------------- driving ----------------
  task automatic mem_access(input mem_op_e op, input int vpn, input int off, input int sz,
                            input logic [7:0] ptag, input int rg, input logic [15:0] val);
    int line; ref_t r; logic [1:0] srt; int t0, x0;
    line = (ppn_of(vpn) * 4096 + off) / 64;
    in_mtw = (op == OP_MTW);
    srt = rtm[rg];
    r = ref_op(op, page_bitmap(vpn), off % 64, sz, ptag, (rg == 0) ? 2'b00 : srt, mt(line), val);
    forever begin
      @(negedge clk);
      req_valid = 1; req_op = op; req_size = 2'(sz); req_reg = 5'(rg); req_val = val;
      req_ptr = (64'(ptag) << 48) | 64'(vpn * 4096 + off);
      while (!req_ready) @(negedge clk);
      t0 = cyc; x0 = n_xfer;
      @(negedge clk); req_valid = 0;
      while (!resp_valid) @(negedge clk);
      if (!resp_tlb_miss) break;
      n_tlb_miss++;
      @(negedge clk); refill_valid = 1; refill_vpn = VPNW'(vpn); refill_ppn = PPNW'(ppn_of(vpn));
      refill_bitmap = page_bitmap(vpn);
      @(negedge clk); refill_valid = 0;
    end
    if (n_xfer == x0) begin
      chk(cyc - t0 == 4, $sformatf("L1 hit latency %0d cycles", cyc - t0 - 1));
      n_hit_timed++;
    end
    chk(resp_fault == r.fault, $sformatf("fault op=%s vpn=%0d off=%0d sz=%0d ptag=%h cur=%h exp=%b",
        op.name(), vpn, off, sz, ptag, mt(line), r.fault));
    chk(resp_rdata == r.rdata, $sformatf("rdata op=%s got %h exp %h", op.name(), resp_rdata, r.rdata));
    if (r.fe) n_fault_equal++;
    if (r.fu) n_fault_uncond++;
    if (r.fc) n_fault_cond++;
    if (!r.fault && (op == OP_LOAD || op == OP_STORE) && resp_bad_bits == 0 && page_bitmap(vpn) != 0) n_pass_checked++;
    if (!r.fault && r.ud) n_upd_set_unset++;
    if (!r.fault && r.up) n_upd_prop++;
    if (!r.fault && r.lp && op == OP_LOAD) n_lprop++;
    mtag[line] = r.newtag;
    if (r.wr_rtag && rg != 0) rtm[rg] = r.rtag;
    csr_addr = CSR_RTAGSAVE; #1;
    for (int i = 0; i < 32; i++)
      chk(csr_rdata[2*i +: 2] == rtm[i], $sformatf("register tag x%0d after %s", i, op.name()));
  endtask

  task automatic alu(input alu_cls_e c, input int a, input int b, input bit imm, input int d);
    logic [1:0] e;
    e = 0;
    // bit 0 belongs to P3 (OR rule), bit 1 to P2 (XOR on ADD/SUB)
    if (c != ALU_CLS_NONE) e[0] = rtm[a][0] | (imm ? 1'b0 : rtm[b][0]);
    if (c == ALU_CLS_ADD || c == ALU_CLS_SUB) e[1] = rtm[a][1] ^ (imm ? 1'b0 : rtm[b][1]);
    @(negedge clk); alu_en = 1; alu_cls = c; alu_rs1 = 5'(a); alu_rs2 = 5'(b); alu_rs2_imm = imm; alu_rd = 5'(d);
    @(negedge clk); alu_en = 0;
    if (d != 0) begin
      if (e[0] && c != ALU_CLS_NONE) n_alu_or++;
      if (e[1]) n_alu_xor++;
      rtm[d] = e;
    end
    rt_reg = 5'(d); #1; chk(rt_rdata == rtm[d], "ALU result tag");
  endtask

  task automatic rtag_op(input rt_op_e o, input int rg, input logic [1:0] v);
    @(negedge clk); rt_en = 1; rt_op = o; rt_reg = 5'(rg); rt_val = v;
    @(negedge clk); rt_en = 0;
    if (rg != 0) case (o)
      RT_WRITE: rtm[rg] = v;
      RT_SET:   rtm[rg] = rtm[rg] | v;
      RT_CLEAR: rtm[rg] = rtm[rg] & ~v;
      default: ;
    endcase
    rt_reg = 5'(rg); #1; chk(rt_rdata == rtm[rg], "rt op");
  endtask

  initial begin
    #60000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int vpns [40];
  initial begin
    for (int i = 0; i < 32; i++) rtm[i] = 0;
    for (int i = 0; i < 40; i++) vpns[i] = 16 + i;
    repeat (3) @(negedge clk); rst_n = 1;

    // Policies off after reset: an access does no tag work.
    mem_access(OP_STORE, vpns[0], 8, 3, 8'h00, 5, 0);

    pol[0] = '{enable:1, mask:16'h5555, gran_log2:3'd5, ld_check:MT_CHECK_EQUAL, ld_check_val:0,
               st_check:MT_CHECK_EQUAL, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
    pol[1] = '{enable:1, mask:16'h5555, gran_log2:3'd3, ld_check:MT_CHECK_UNCOND, ld_check_val:0,
               st_check:MT_CHECK_UNCOND, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
    pol[2] = '{enable:1, mask:16'hAAAA, gran_log2:3'd3, ld_check:MT_CHECK_COND, ld_check_val:1,
               st_check:MT_CHECK_NONE, st_check_val:0, l_prop:0, st_update:S_UNSET, alu_prop:ALU_PROP_XOR_AS};
    pol[3] = '{enable:1, mask:16'h5555, gran_log2:3'd3, ld_check:MT_CHECK_NONE, ld_check_val:0,
               st_check:MT_CHECK_NONE, st_check_val:0, l_prop:1, st_update:S_PROP, alu_prop:ALU_PROP_OR};
    for (int p = 0; p < NPOL; p++) csr_write(CSR_TAGPOL0 + 12'(p), 64'(pol[p]));
    for (int p = 0; p < NPOL; p++) begin
      csr_addr = CSR_TAGPOL0 + 12'(p); #1; chk(csr_rdata[30:0] == 31'(pol[p]), "policy CSR readback");
    end

    // Document scenario: return address saved, tagged, protected, untagged, reloaded.
    mem_access(OP_STORE, vpns[1], 24, 3, 8'h00, 1, 0);     // sd ra, 24(sp)
    mem_access(OP_MTSD,  vpns[1], 24, 3, 8'h00, 0, 16'd1); // mtsd: even bit (P1)
    mem_access(OP_STORE, vpns[1], 24, 3, 8'h00, 7, 0);     // overwrite attempt: fault
    chk(resp_fault, "return address overwrite blocked");
    mem_access(OP_MTCD,  vpns[1], 24, 3, 8'h00, 0, 16'd1); // mtcd
    mem_access(OP_LOAD,  vpns[1], 24, 3, 8'h00, 1, 0);     // ld ra
    chk(!resp_fault, "return address reload allowed");

    // Random traffic.
    for (int it = 0; it < 6000; it++) begin
      int k;
      k = $urandom_range(99);
      if (k < 60) begin
        mem_op_e op; int vpn, sz, off; logic [7:0] ptag; int sel;
        sel = $urandom_range(99);
        op = sel < 30 ? OP_LOAD : sel < 55 ? OP_STORE : sel < 60 ? OP_LDP : sel < 65 ? OP_SDP :
             sel < 70 ? OP_MTRD : sel < 78 ? OP_MTWD : sel < 84 ? OP_MTSD : sel < 88 ? OP_MTCD :
             sel < 94 ? OP_MTR : OP_MTW;
        vpn = vpns[$urandom_range(39)];
        sz = $urandom_range(3);
        off = ($urandom_range(4095) >> sz) << sz;
        if (op inside {OP_MTRD, OP_MTWD, OP_MTSD, OP_MTCD, OP_LDP, OP_SDP}) begin sz = 3; off = off & ~7; end
        case ($urandom_range(3))
          0: ptag = 8'h00;
          1: ptag = 8'($urandom);
          default: begin   // the colour currently stored for this granule (even bits)
            logic [15:0] t;
            t = mt((ppn_of(vpn) * 4096 + off) / 64);
            ptag = ((off % 64) < 32) ? t[7:0] : t[15:8];
          end
        endcase
        mem_access(op, vpn, off, sz, ptag, $urandom_range(31), 16'($urandom));
      end else if (k < 80) begin
        alu_cls_e c;
        c = alu_cls_e'($urandom_range(3));
        alu(c, $urandom_range(31), $urandom_range(31), 1'($urandom), $urandom_range(31));
      end else if (k < 90) begin
        rtag_op(rt_op_e'($urandom_range(3)), $urandom_range(31), 2'($urandom));
      end else if (k < 95) begin
        logic [63:0] p; logic [7:0] v; logic [7:0] t;
        p = {$urandom, $urandom}; v = 8'($urandom); pt_op = pt_op_e'($urandom_range(3));
        pt_ptr = p; pt_val = v; #1;
        t = p[55:48];
        case (pt_op) PT_WRITE: t = v; PT_SET: t = t | v; PT_CLEAR: t = t & ~v; default: ; endcase
        chk(pt_result == {p[63:56], t, p[47:0]}, "pointer tag instruction");
        n_ptr_ops++;
      end else if (k < 97) begin
        // Trap: kernel saves the register tags, clobbers them, restores them.
        logic [63:0] saved;
        csr_addr = CSR_RTAGSAVE; #1; saved = csr_rdata;
        csr_write(CSR_RTAGSAVE, {$urandom, $urandom});
        csr_write(CSR_RTAGSAVE, saved);
        csr_addr = CSR_RTAGSAVE; #1; chk(csr_rdata == saved, "register tags restored");
        n_csr_restore++;
      end else begin
        @(negedge clk); tlb_flush = 1; @(negedge clk); tlb_flush = 0;
      end
    end

    // Final sweep: every line tag the model knows must read back.
    foreach (mtag[l]) begin
      int vpn;
      vpn = -1;
      for (int i = 0; i < 40; i++) if (ppn_of(vpns[i]) == (l * 64) / 4096) vpn = vpns[i];
      if (vpn >= 0) mem_access(OP_MTR, vpn, (l * 64) % 4096, 3, 8'h00, 0, 0);
    end

    $display("tlb_miss=%0d l1_hit=%0d fill_data_only=%0d fill_with_tag=%0d tag_only_fetch=%0d",
             n_tlb_miss, n_l1_hit, n_fill_data_only, n_fill_with_tag, n_tag_only);
    $display("tag_writeback=%0d full_write_fill=%0d tagcache_hit=%0d tagcache_miss=%0d",
             n_tag_wb, n_full_write_fill, n_tc_hit, n_tc_miss);
    $display("fault_equal=%0d fault_uncond=%0d fault_cond=%0d upd_set_unset=%0d upd_prop=%0d load_prop=%0d",
             n_fault_equal, n_fault_uncond, n_fault_cond, n_upd_set_unset, n_upd_prop, n_lprop);
    $display("alu_or=%0d alu_xor=%0d csr_restore=%0d ptr_ops=%0d passed_checks=%0d",
             n_alu_or, n_alu_xor, n_csr_restore, n_ptr_ops, n_pass_checked);
    chk(n_tlb_miss > 0 && n_tlb_evt == n_tlb_miss, "mechanism: TLB miss");
    chk(n_l1_hit > 0 && n_hit_timed > 0, "mechanism: L1 hit");
    chk(n_fill_data_only > 0, "mechanism: data-only fill");
    chk(n_fill_with_tag > 0, "mechanism: fill with tag");
    chk(n_tag_only > 0, "mechanism: tag-only fetch");
    chk(n_tag_wb > 0, "mechanism: dirty tag write-back");
    chk(n_full_write_fill > 0, "mechanism: full-tag write skips fetch");
    chk(n_tc_hit > 0 && n_tc_miss > 0, "mechanism: tag cache hit and miss");
    chk(n_fault_equal > 0, "mechanism: EQUAL check fault");
    chk(n_fault_uncond > 0, "mechanism: UNCOND check fault");
    chk(n_fault_cond > 0, "mechanism: COND check fault");
    chk(n_upd_set_unset > 0 && n_upd_prop > 0, "mechanism: store updates");
    chk(n_lprop > 0, "mechanism: load propagation");
    chk(n_alu_or > 0 && n_alu_xor > 0, "mechanism: ALU propagation");
    chk(n_csr_restore > 0 && n_ptr_ops > 0, "mechanism: CSR save/restore, pointer ops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
