// Self-checking test of cctag_tlb against a reference map of the entries it
// should still hold: refills, lookups of present and absent pages, refill of
// an existing VPN (bitmap change), eviction once all entries are full, and
// flush. ENTRIES is reduced to 8 to reach eviction quickly.
// The per-entry bitmap follows the document; size and replacement are this
// design's own.
module tb_cctag_tlb;
  import cctag_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  logic [VPNW-1:0] lk_vpn = '0; logic lk_hit; logic [PPNW-1:0] lk_ppn; logic [NPOL-1:0] lk_bitmap;
  logic refill_valid = 0; logic [VPNW-1:0] refill_vpn = '0; logic [PPNW-1:0] refill_ppn = '0;
  logic [NPOL-1:0] refill_bitmap = '0; logic flush = 0;
  int checks = 0, failures = 0;

  cctag_tlb #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  task automatic refill(input int vpn, input int ppn, input int bm);
    @(negedge clk); refill_valid = 1; refill_vpn = VPNW'(vpn); refill_ppn = PPNW'(ppn); refill_bitmap = NPOL'(bm);
    @(negedge clk); refill_valid = 0;
  endtask

  task automatic expect_hit(input int vpn, input int ppn, input int bm);
    lk_vpn = VPNW'(vpn); #1; checks++;
    if (!lk_hit || lk_ppn != PPNW'(ppn) || lk_bitmap != NPOL'(bm)) begin
      failures++; $display("FAIL vpn %h: hit=%b ppn=%h bm=%b", vpn, lk_hit, lk_ppn, lk_bitmap); end
  endtask

  task automatic expect_miss(input int vpn);
    lk_vpn = VPNW'(vpn); #1; checks++;
    if (lk_hit) begin failures++; $display("FAIL vpn %h should miss", vpn); end
  endtask

  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int hits;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_miss(5);
    for (int i = 0; i < E; i++) refill(100 + i, 7000 + i, i % 16);
    for (int i = 0; i < E; i++) expect_hit(100 + i, 7000 + i, i % 16);
    expect_miss(99);
    refill(103, 9999, 4'b1010);                // same VPN: replaced in place
    expect_hit(103, 9999, 4'b1010);
    for (int i = 0; i < E; i++) if (i != 3) expect_hit(100 + i, 7000 + i, i % 16);
    refill(500, 1, 4'b0001);                   // full: evicts exactly one
    expect_hit(500, 1, 4'b0001);
    hits = 0;
    for (int i = 0; i < E; i++) begin lk_vpn = VPNW'(100 + i); #1; if (lk_hit) hits++; end
    checks++; if (hits != E - 1) begin failures++; $display("FAIL eviction count %0d", hits); end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    expect_miss(500); expect_miss(101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
