// Protection scenarios on cctag_top at its default sizes. Each scenario
// configures the policies the way a protected runtime would, runs the
// instrumented code pattern of that protection as a sequence of tag-unit
// requests, and checks both sides: benign code never faults, and every
// attack step faults.
//
//   none        all policies off: no faults, every fill is data-only
//   retaddr     1 bit per 8 B, UNCOND = 0 on stack pages; the prologue
//               stores ra then sets its tag, the epilogue clears it; an
//               overflow write to the slot in between must fault
//   codeptr     1 bit per 8 B on the odd tag bits, COND load check = 1,
//               stores clear the bit; a trusted store sets it; a pointer load
//               with the check bits set faults once the pointer was
//               overwritten by a plain store
//   heap        4 colour bits per 32 B, EQUAL check on heap pages; the
//               allocator colours chunks and returns coloured pointers;
//               overflow into the next chunk and use after free must fault
//   sweep       pointer tracking: register tags follow pointers (XOR on
//               ADD/SUB, load and store propagation); a sweep of the tag bits
//               finds exactly the slots that hold heap pointers
//   integrated  retaddr + codeptr + heap at once, sharing the tag bits
//               (heap colours and return-address bits on even bits of
//               different pages, code-pointer bits on the odd bits)
// A behavioural memory answers data and tag transfers after random delays.
// A scenario whose attack is never caught, or whose benign code faults,
// counts failures; so does a scenario that never ran a step.
// The scenarios are the protections the document evaluates; the code
// patterns, page layout and chunk sizes are this test's own.
module tb_cctag_scenarios;
  import cctag_pkg::*;

  logic clk = 0, rst_n = 0;
  logic csr_we = 0; logic [11:0] csr_addr = '0; logic [63:0] csr_wdata = '0, csr_rdata;
  logic refill_valid = 0; logic [VPNW-1:0] refill_vpn = '0; logic [PPNW-1:0] refill_ppn = '0;
  logic [NPOL-1:0] refill_bitmap = '0; logic tlb_flush = 0;
  logic req_valid = 0, req_ready; mem_op_e req_op = OP_LOAD; logic [63:0] req_ptr = '0;
  logic [1:0] req_size = '0; logic [4:0] req_reg = '0; logic [15:0] req_val = '0;
  logic resp_valid, resp_fault, resp_tlb_miss; logic [15:0] resp_bad_bits, resp_rdata;
  logic [7:0] perf_evt;
  logic rt_en = 0; rt_op_e rt_op = RT_READ; logic [4:0] rt_reg = '0; logic [1:0] rt_val = '0, rt_rdata;
  logic alu_en = 0; alu_cls_e alu_cls = ALU_CLS_ADD; logic [4:0] alu_rs1 = '0, alu_rs2 = '0, alu_rd = '0;
  logic alu_rs2_imm = 0;
  pt_op_e pt_op = PT_NONE; logic [63:0] pt_ptr = '0, pt_result; logic [7:0] pt_val = '0;
  logic dmem_valid, dmem_ready, dmem_we, dmem_done = 0; logic [LADDRW-1:0] dmem_laddr;
  logic tmem_valid, tmem_ready, tmem_we, tmem_rvalid = 0; logic [LADDRW-1:0] tmem_addr;
  logic [511:0] tmem_wdata, tmem_rdata = '0;

  cctag_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // ---------------- behavioural memory ----------------
  logic [511:0] tstore [logic [LADDRW-1:0]];
  assign dmem_ready = 1'b1;
  assign tmem_ready = 1'b1;
  always @(posedge clk) begin
    if (dmem_valid)
      fork begin repeat ($urandom_range(4, 1)) @(posedge clk); dmem_done <= 1; @(posedge clk); dmem_done <= 0; end join_none
    if (tmem_valid) begin
      automatic logic [LADDRW-1:0] a = tmem_addr;
      if (tmem_we) tstore[a] = tmem_wdata;
      else fork begin
        repeat ($urandom_range(5, 2)) @(posedge clk);
        tmem_rdata <= tstore.exists(a) ? tstore[a] : '0; tmem_rvalid <= 1;
        @(posedge clk); tmem_rvalid <= 0;
      end join_none
    end
  end

  int n_tag_transfers = 0, n_data_only = 0;
  always @(posedge clk) if (rst_n) begin
    if (perf_evt[2] || perf_evt[4] || perf_evt[5]) n_tag_transfers++;
    if (perf_evt[3]) n_data_only++;
  end

  // ---------------- pages ----------------
  localparam int STACK_VPN = 'h100;   // 4 stack pages
  localparam int HEAP_VPN  = 'h200;   // 16 heap pages
  localparam int DATA_VPN  = 'h300;   // 4 global-data pages
  logic [3:0] bm_stack, bm_heap, bm_data;
  function automatic logic [3:0] bitmap_of(input int vpn);
    if (vpn >= HEAP_VPN && vpn < HEAP_VPN + 16) return bm_heap;
    if (vpn >= STACK_VPN && vpn < STACK_VPN + 4) return bm_stack;
    return bm_data;
  endfunction

  // ---------------- request helpers ----------------
  bit last_fault;
  logic [15:0] last_rdata;
  task automatic acc(input mem_op_e op, input logic [63:0] ptr, input int sz, input int rg,
                     input logic [15:0] val);
    int vpn;
    vpn = int'(ptr[38:12]);
    forever begin
      @(negedge clk);
      req_valid = 1; req_op = op; req_ptr = ptr; req_size = 2'(sz); req_reg = 5'(rg); req_val = val;
      while (!req_ready) @(negedge clk);
      @(negedge clk); req_valid = 0;
      while (!resp_valid) @(negedge clk);
      if (!resp_tlb_miss) break;
      @(negedge clk); refill_valid = 1; refill_vpn = VPNW'(vpn); refill_ppn = PPNW'(vpn + 'h1000);
      refill_bitmap = bitmap_of(vpn);
      @(negedge clk); refill_valid = 0;
    end
    last_fault = resp_fault; last_rdata = resp_rdata;
  endtask

  int benign = 0, attacks = 0;
  task automatic ok_acc(input mem_op_e op, input logic [63:0] ptr, input int sz, input int rg,
                        input logic [15:0] val, input string what);
    acc(op, ptr, sz, rg, val); benign++;
    chk(!last_fault, {"benign access faulted: ", what});
  endtask
  task automatic bad_acc(input mem_op_e op, input logic [63:0] ptr, input int sz, input int rg,
                         input logic [15:0] val, input string what);
    acc(op, ptr, sz, rg, val); attacks++;
    chk(last_fault, {"attack not caught: ", what});
  endtask

  task automatic csr_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d; @(negedge clk); csr_we = 0;
    csr_addr = CSR_RTAGSAVE;
  endtask
  task automatic flush();
    @(negedge clk); tlb_flush = 1; @(negedge clk); tlb_flush = 0;
  endtask
  task automatic set_pol(input int p, input policy_cfg_t c);
    csr_write(CSR_TAGPOL0 + 12'(p), 64'(c));
  endtask
  task automatic clear_pols();
    for (int p = 0; p < NPOL; p++) set_pol(p, POL_OFF);
  endtask
  task automatic rtw(input int rg, input logic [1:0] v);
    @(negedge clk); rt_en = 1; rt_op = RT_WRITE; rt_reg = 5'(rg); rt_val = v; @(negedge clk); rt_en = 0;
  endtask
  task automatic alu(input alu_cls_e c, input int a, input int b, input bit imm, input int d);
    @(negedge clk); alu_en = 1; alu_cls = c; alu_rs1 = 5'(a); alu_rs2 = 5'(b); alu_rs2_imm = imm; alu_rd = 5'(d);
    @(negedge clk); alu_en = 0;
  endtask
  function automatic logic [1:0] rtag(input int rg);
    return csr_rdata[2*rg +: 2];   // csr_addr rests on the register-tag CSR
  endfunction
  function automatic logic [63:0] va(input int vpn, input int off, input logic [7:0] ptag = 8'h00);
    return (64'(ptag) << 48) | 64'(vpn * 4096 + off);
  endfunction

  // ---------------- policy configurations ----------------
  function automatic policy_cfg_t p_retaddr();
    return '{enable:1, mask:16'h5555, gran_log2:3'd3, ld_check:MT_CHECK_UNCOND, ld_check_val:0,
             st_check:MT_CHECK_UNCOND, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
  endfunction
  function automatic policy_cfg_t p_codeptr();
    return '{enable:1, mask:16'hAAAA, gran_log2:3'd3, ld_check:MT_CHECK_COND, ld_check_val:1,
             st_check:MT_CHECK_NONE, st_check_val:0, l_prop:0, st_update:S_UNSET, alu_prop:ALU_PROP_NONE};
  endfunction
  function automatic policy_cfg_t p_heap();
    return '{enable:1, mask:16'h5555, gran_log2:3'd5, ld_check:MT_CHECK_EQUAL, ld_check_val:0,
             st_check:MT_CHECK_EQUAL, st_check_val:0, l_prop:0, st_update:S_NONE, alu_prop:ALU_PROP_NONE};
  endfunction
  function automatic policy_cfg_t p_sweep();
    return '{enable:1, mask:16'hAAAA, gran_log2:3'd3, ld_check:MT_CHECK_NONE, ld_check_val:0,
             st_check:MT_CHECK_NONE, st_check_val:0, l_prop:1, st_update:S_PROP, alu_prop:ALU_PROP_XOR_AS};
  endfunction

  // ---------------- protection patterns ----------------
  // Return addresses: nested calls, each frame 64 bytes, ra at offset 56.
  task automatic run_retaddr(input int depth);
    int sp;
    sp = STACK_VPN * 4096 + 4 * 4096;
    for (int d = 0; d < depth; d++) begin
      sp -= 64;
      ok_acc(OP_STORE, va(sp / 4096, sp % 4096 + 56), 3, 1, 0, "prologue sd ra");
      ok_acc(OP_MTSD,  va(sp / 4096, sp % 4096 + 56), 3, 0, 16'd1, "prologue tag ra");
      ok_acc(OP_STORE, va(sp / 4096, sp % 4096 + 8 * $urandom_range(6)), 3, 7, 0, "local variable");
      if (d % 3 == 1) bad_acc(OP_STORE, va(sp / 4096, sp % 4096 + 56), 3, 9, 0, "overflow onto ra");
      if (d % 5 == 2) bad_acc(OP_STORE, va(sp / 4096, sp % 4096 + 60), 2, 9, 0, "4-byte write into ra");
    end
    for (int d = 0; d < depth; d++) begin
      ok_acc(OP_MTCD, va(sp / 4096, sp % 4096 + 56), 3, 0, 16'd1, "epilogue untag ra");
      ok_acc(OP_LOAD, va(sp / 4096, sp % 4096 + 56), 3, 1, 0, "epilogue ld ra");
      sp += 64;
    end
  endtask

  // Code pointers in objects on heap or global pages: the trusted writer
  // (constructor, vtable setup) stores and then marks the slot; every
  // indirect call loads through a pointer whose odd tag bits are set.
  task automatic run_codeptr(input int vpn0, input int n);
    for (int i = 0; i < n; i++) begin
      int vpn, off;
      vpn = vpn0 + (i % 4); off = 128 * (i % 32);
      ok_acc(OP_STORE, va(vpn, off), 3, 5, 0, "store vtable pointer");
      ok_acc(OP_MTSD,  va(vpn, off), 3, 0, 16'd2, "mark vtable pointer");
      ok_acc(OP_LOAD,  va(vpn, off, 8'hAA), 3, 6, 0, "checked load of vtable pointer");
      ok_acc(OP_LOAD,  va(vpn, off + 8), 3, 6, 0, "ordinary data load next to it");
      if (i % 2 == 0) begin
        ok_acc(OP_STORE, va(vpn, off), 3, 9, 0, "attacker overwrites the pointer");
        bad_acc(OP_LOAD, va(vpn, off, 8'hAA), 3, 6, 0, "call through overwritten pointer");
      end
      bad_acc(OP_LOAD, va(vpn, off + 16, 8'hAA), 3, 6, 0, "call through forged pointer slot");
    end
  endtask

  // Heap colouring: 64-byte chunks, each with its own colour in the even
  // tag bits of its lines; the odd bits are left to other policies.
  logic [7:0] chunk_col [64];
  function automatic logic [7:0] colour(input int k); return 8'({1'b0, k[3], 1'b0, k[2], 1'b0, k[1], 1'b0, k[0]}); endfunction
  task automatic colour_chunk(input int c, input logic [7:0] col);
    logic [15:0] t;
    acc(OP_MTR, va(HEAP_VPN + c / 64, 64 * (c % 64)), 3, 0, 0);
    t = (last_rdata & 16'hAAAA) | ({col, col} & 16'h5555);
    ok_acc(OP_MTW, va(HEAP_VPN + c / 64, 64 * (c % 64)), 3, 0, t, "allocator colours chunk");
  endtask
  task automatic run_heap(input int n);
    for (int c = 0; c < n; c++) begin
      chunk_col[c] = colour(c % 8 + 1);
      colour_chunk(c, chunk_col[c]);
    end
    for (int c = 0; c < n; c++) begin
      int vpn, base;
      vpn = HEAP_VPN + c / 64; base = 64 * (c % 64);
      ok_acc(OP_STORE, va(vpn, base + 8 * $urandom_range(7), chunk_col[c]), 3, 4, 0, "in-bounds store");
      ok_acc(OP_LOAD,  va(vpn, base + $urandom_range(63), chunk_col[c]), 0, 4, 0, "in-bounds byte load");
      if (c + 1 < n && chunk_col[c + 1] != chunk_col[c])
        bad_acc(OP_STORE, va(vpn, base + 64, chunk_col[c]), 3, 4, 0, "overflow into next chunk");
    end
    // free: recolour, then the stale pointer must fault
    for (int c = 0; c < n; c += 3) begin
      int vpn, base;
      logic [7:0] nc;
      vpn = HEAP_VPN + c / 64; base = 64 * (c % 64);
      nc = colour((c + 5) % 8 + 1);
      if (nc == chunk_col[c]) nc = colour((c + 6) % 8 + 1);
      colour_chunk(c, nc);
      bad_acc(OP_LOAD, va(vpn, base + 16, chunk_col[c]), 3, 4, 0, "use after free");
      chunk_col[c] = nc;
      ok_acc(OP_LOAD, va(vpn, base + 16, nc), 3, 4, 0, "load through the new pointer");
    end
  endtask

  // Dangling-pointer sweep: x5 holds a heap pointer (register tag bit 1).
  task automatic run_sweep(input int slots);
    bit is_ptr [];
    int found;
    is_ptr = new[slots];
    rtw(5, 2'b10);
    rtw(9, 2'b10);
    rtw(7, 2'b00);
    alu(ALU_CLS_ADD, 5, 0, 1, 6);             // x6 = x5 + 16: still a pointer
    chk(rtag(6) == 2'b10, "pointer + offset keeps the pointer tag");
    alu(ALU_CLS_SUB, 5, 9, 0, 8);             // x8 = x5 - x9: a plain distance
    chk(rtag(8) == 2'b00, "pointer - pointer is not a pointer");
    for (int s = 0; s < slots; s++) begin
      int k;
      k = $urandom_range(2);
      is_ptr[s] = (k == 0);
      ok_acc(OP_STORE, va(DATA_VPN, 8 * s), 3, k == 0 ? 6 : k == 1 ? 7 : 8, 0, "store to global");
    end
    ok_acc(OP_LOAD, va(DATA_VPN, 0), 3, 10, 0, "reload slot 0");
    chk(rtag(10) == (is_ptr[0] ? 2'b10 : 2'b00), "load propagates the pointer tag");
    found = 0;
    for (int s = 0; s < slots; s++) begin
      ok_acc(OP_MTRD, va(DATA_VPN, 8 * s), 3, 0, 0, "sweep reads tag");
      chk(last_rdata[1] == is_ptr[s], $sformatf("sweep classifies slot %0d", s));
      if (last_rdata[1]) begin
        found++;
        ok_acc(OP_STORE, va(DATA_VPN, 8 * s), 3, 0, 0, "nullify dangling pointer");
      end
    end
    chk(found > 0, "sweep found pointers");
    for (int s = 0; s < slots; s++) begin
      acc(OP_MTRD, va(DATA_VPN, 8 * s), 3, 0, 0);
      chk(last_rdata[1] == 1'b0, "no pointer left after the sweep");
    end
  endtask

  int sc_steps [6];
  initial begin
    #40000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int b0, a0, t0;
    csr_addr = CSR_RTAGSAVE;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. no protection
    bm_stack = 0; bm_heap = 0; bm_data = 0;
    t0 = n_tag_transfers; b0 = benign;
    for (int i = 0; i < 200; i++)
      ok_acc(($urandom_range(1) != 0) ? OP_LOAD : OP_STORE, va(HEAP_VPN + $urandom_range(15), 8 * $urandom_range(511)),
             3, $urandom_range(31), 0, "unprotected access");
    chk(n_tag_transfers == t0, "no tag traffic without policies");
    chk(n_data_only > 0, "data-only fills happen");
    sc_steps[0] = benign - b0;

    // 2. return-address protection
    set_pol(1, p_retaddr()); bm_stack = 4'b0010; flush();
    b0 = benign; a0 = attacks;
    run_retaddr(20);
    sc_steps[1] = (benign - b0) * (attacks - a0);
    clear_pols(); bm_stack = 0; flush();

    // 3. code-pointer and vtable-pointer protection
    set_pol(2, p_codeptr()); bm_data = 4'b0100; bm_heap = 4'b0100; flush();
    b0 = benign; a0 = attacks;
    run_codeptr(DATA_VPN, 24);
    sc_steps[2] = (benign - b0) * (attacks - a0);
    clear_pols(); bm_data = 0; bm_heap = 0; flush();

    // 4. heap colouring
    set_pol(0, p_heap()); bm_heap = 4'b0001; flush();
    b0 = benign; a0 = attacks;
    run_heap(48);
    sc_steps[3] = (benign - b0) * (attacks - a0);
    clear_pols(); bm_heap = 0; flush();

    // 5. dangling-pointer sweeping
    set_pol(3, p_sweep()); bm_data = 4'b1000; flush();
    b0 = benign;
    run_sweep(40);
    sc_steps[4] = benign - b0;
    clear_pols(); bm_data = 0; flush();

    // 6. integrated: three policies at once
    set_pol(0, p_heap()); set_pol(1, p_retaddr()); set_pol(2, p_codeptr());
    bm_heap = 4'b0101; bm_stack = 4'b0110; bm_data = 4'b0100; flush();
    b0 = benign; a0 = attacks;
    run_heap(32);
    run_retaddr(12);
    run_codeptr(HEAP_VPN + 4, 16);   // objects on heap pages beyond the coloured chunks
    run_codeptr(DATA_VPN, 8);
    // heap colours survived the code-pointer marks on the odd bits
    for (int c = 0; c < 32; c++)
      ok_acc(OP_LOAD, va(HEAP_VPN, 64 * c + 24, chunk_col[c]), 3, 4, 0, "heap colour intact");
    sc_steps[5] = (benign - b0) * (attacks - a0);

    $display("benign=%0d attacks=%0d tag_transfers=%0d data_only_fills=%0d",
             benign, attacks, n_tag_transfers, n_data_only);
    foreach (sc_steps[i]) chk(sc_steps[i] > 0, $sformatf("scenario %0d ran benign and attack steps", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
