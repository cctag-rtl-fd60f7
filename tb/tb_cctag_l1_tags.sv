// Self-checking test of cctag_l1_tags with SETS reduced to 4. A reference
// model keeps the resident lines of each set. On a
// miss, the most recently used way is never the victim, invalid ways are filled first,
// and install/update/lookup must agree with the model for random traffic.
// Pseudo-LRU replacement follows the document's cache setup; the exact
// tree order is this design's own, so only its guarantees are checked.
module tb_cctag_l1_tags;
  import cctag_pkg::*;
  localparam int S = 4;
  logic clk = 0, rst_n = 0;
  logic [LADDRW-1:0] lk_laddr = '0; logic lk_hit; logic [1:0] lk_way; logic [15:0] lk_tag; logic lk_tv, lk_td;
  logic [1:0] vic_way; logic vic_valid; logic [LADDRW-1:0] vic_laddr; logic [15:0] vic_tag; logic vic_td;
  logic wr_en = 0; logic [LADDRW-1:0] wr_laddr = '0; logic [1:0] wr_way = 0; logic [15:0] wr_tag = 0;
  logic wr_tv = 0, wr_td = 0, touch_en = 0; logic [LADDRW-1:0] touch_laddr = '0; logic [1:0] touch_way = 0;
  int checks = 0, failures = 0;
  // model: per line address -> {tag, tv, td}
  logic [17:0] model [logic [LADDRW-1:0]];

  cctag_l1_tags #(.SETS(S)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // Access a line: hit -> update, miss -> install in victim way.
  task automatic access(input logic [LADDRW-1:0] a, input logic [15:0] t, input bit tv, input bit td);
    @(negedge clk); lk_laddr = a; #1;
    chk(lk_hit == model.exists(a), $sformatf("hit flag for %h", a));
    if (lk_hit) chk({lk_tag, lk_tv, lk_td} == model[a], "stored tag");
    wr_laddr = a; wr_way = lk_hit ? lk_way : vic_way; wr_tag = t; wr_tv = tv; wr_td = td;
    if (!lk_hit && vic_valid) begin
      chk(model.exists(vic_laddr), "victim is a resident line");
      chk(vic_laddr % S == a % S, "victim in same set");
      chk({vic_tag, vic_td} == {model[vic_laddr][17:2], model[vic_laddr][0]}, "victim tag");
      model.delete(vic_laddr);
    end
    wr_en = 1; model[a] = {t, tv, td};
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // Fill set 1: invalid ways are used first, so four lines all stay resident.
    for (int i = 0; i < 4; i++) access(LADDRW'(1 + S*i), 16'(i), 1, 0);
    for (int i = 0; i < 4; i++) begin
      lk_laddr = LADDRW'(1 + S*i); #1; chk(lk_hit, "four lines resident");
    end
    // Further misses in the set never evict the most recently used line.
    for (int i = 4; i < 12; i++) begin
      lk_laddr = LADDRW'(1 + S*i); #1;
      chk(vic_valid && vic_laddr != LADDRW'(1 + S*(i-1)), $sformatf("victim is not MRU, round %0d", i));
      access(LADDRW'(1 + S*i), 16'(i), 1, 1);
    end
    // Random traffic over a small address range.
    for (int it = 0; it < 3000; it++)
      access(LADDRW'($urandom_range(40)), 16'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
