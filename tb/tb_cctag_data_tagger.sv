// Self-checking test of cctag_data_tagger with a behavioural DRAM that
// serves the data port and the tag port with random delays. Checks: every
// request makes exactly one data transfer; tags written by releases with
// need-tag read back through acquires (also after tag-cache evictions);
// requests without need-tag cause no tag traffic; tag lines are fetched from
// the address TAG_BASE + 2*line rounded down to 64 bytes.
// The need-tag behaviour follows the document; the tag-region address
// formula, need-data transfers and memory latencies are this design's own.
module tb_cctag_data_tagger;
  import cctag_pkg::*;
  localparam logic [31:0] TB = 32'hF800_0000;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, req_need_tag = 0, req_need_data = 1; logic [25:0] req_laddr = '0;
  logic [15:0] req_tag = '0, resp_tag; logic resp_valid, resp_tag_hit;
  logic dmem_valid, dmem_ready, dmem_we, dmem_done = 0; logic [25:0] dmem_laddr;
  logic tmem_valid, tmem_ready, tmem_we, tmem_rvalid = 0; logic [25:0] tmem_addr;
  logic [511:0] tmem_wdata, tmem_rdata = '0;
  logic [511:0] tstore [logic [25:0]];
  logic [15:0] refm [logic [25:0]];
  int checks = 0, failures = 0, n_dmem = 0, n_tmem = 0, n_req = 0, n_tagonly = 0;

  cctag_data_tagger #(.TC_SETS(2)) dut (.*);
  always #5 clk = ~clk;

  assign dmem_ready = 1'b1;
  assign tmem_ready = 1'b1;
  always @(posedge clk) begin
    if (dmem_valid) begin
      n_dmem++;
      fork begin repeat ($urandom_range(6, 1)) @(posedge clk); dmem_done <= 1; @(posedge clk); dmem_done <= 0; end join_none
    end
    if (tmem_valid) begin
      automatic logic [25:0] a = tmem_addr;
      n_tmem++;
      if (a < 26'(TB >> 6)) begin failures++; $display("FAIL tag access outside tag region %h", a); end
      if (tmem_we) tstore[a] = tmem_wdata;
      else fork begin
        repeat ($urandom_range(8, 2)) @(posedge clk);
        tmem_rdata <= tstore.exists(a) ? tstore[a] : '0; tmem_rvalid <= 1;
        @(posedge clk); tmem_rvalid <= 0;
      end join_none
    end
  end

  task automatic xfer(input bit we, input int line, input bit need, input logic [15:0] t, input bit nd = 1);
    @(negedge clk); req_valid = 1; req_need_data = nd | ~need; if (!req_need_data) n_tagonly++; req_we = we; req_laddr = 26'(line); req_need_tag = need; req_tag = t;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    n_req++;
    if (need && !we) begin
      checks++;
      if (resp_tag !== (refm.exists(26'(line)) ? refm[26'(line)] : 16'h0)) begin
        failures++; $display("FAIL tag of line %0d: %h", line, resp_tag); end
    end
    if (need && we) refm[26'(line)] = t;
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    // Data-only traffic: no tag accesses at all.
    for (int i = 0; i < 50; i++) xfer(1'($urandom), $urandom_range(100000), 0, 16'hFFFF);
    checks++; if (n_tmem != 0) begin failures++; $display("FAIL data-only made %0d tag accesses", n_tmem); end
    // First tag fetch: line 64 lives at TAG_BASE + 128 -> tag-line (TB>>6) + 2.
    xfer(0, 64, 1, 0);
    checks++; if (!tstore.exists(26'(TB >> 6) + 26'd2) && n_tmem != 1) failures++;
    // Mixed traffic over 8 tag lines (256 data lines) with a 2-set tag cache.
    for (int i = 0; i < 2000; i++)
      xfer(1'($urandom), $urandom_range(255) + 4096 * $urandom_range(3), 1'($urandom), 16'($urandom), 1'($urandom));
    checks++; if (n_dmem != n_req - n_tagonly || n_tagonly == 0) begin failures++; $display("FAIL data transfers %0d for %0d requests", n_dmem, n_req); end
    $display("requests=%0d tag-memory accesses=%0d", n_req, n_tmem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
