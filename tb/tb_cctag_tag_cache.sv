// Self-checking test of cctag_tag_cache with a behavioural tag backing
// store that answers reads after a random delay. A reference array holds the
// value every tag entry must read back. Random reads and writes over a range
// larger than the cache force misses, dirty write-backs and refills; every
// hit must answer exactly 2 cycles after acceptance, and the test requires
// hits, misses and dirty write-backs to have occurred.
// The 4-way, 64-byte-line organisation and 2-cycle hit follow the document;
// write-back and write-allocate are this design's own. SETS is reduced to 2.
module tb_cctag_tag_cache;
  import cctag_pkg::*;
  localparam int TLAW = 26;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0; logic [TLAW-1:0] req_tladdr = '0; logic [4:0] req_idx = '0;
  logic [15:0] req_wdata = '0, resp_rdata; logic resp_valid, resp_was_hit;
  logic mem_valid, mem_ready, mem_we, mem_rvalid = 0; logic [TLAW-1:0] mem_addr;
  logic [511:0] mem_wdata, mem_rdata = '0;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_wb = 0;
  logic [511:0] store [logic [TLAW-1:0]];
  logic [15:0]  refm  [logic [31:0]];

  cctag_tag_cache #(.SETS(2), .TLAW(TLAW)) dut (.*);
  always #5 clk = ~clk;

  // Backing store: writes accepted at once, reads answered 3..8 cycles later.
  assign mem_ready = 1'b1;
  always @(posedge clk) begin
    if (mem_valid && mem_we) begin store[mem_addr] = mem_wdata; n_wb++; end
    if (mem_valid && !mem_we) begin
      automatic logic [TLAW-1:0] a = mem_addr;
      fork begin
        repeat ($urandom_range(8, 3)) @(posedge clk);
        mem_rdata <= store.exists(a) ? store[a] : '0;
        mem_rvalid <= 1'b1;
        @(posedge clk); mem_rvalid <= 1'b0;
      end join_none
    end
  end

  task automatic op(input bit we, input int line, input int idx, input logic [15:0] v);
    int t0, t1; logic [31:0] key;
    key = 32'(line) * 32 + 32'(idx);
    @(negedge clk); req_valid = 1; req_we = we; req_tladdr = TLAW'(line); req_idx = 5'(idx); req_wdata = v;
    while (!req_ready) @(negedge clk);
    @(posedge clk); t0 = $time / 10; @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    t1 = $time / 10;
    if (resp_was_hit) begin
      n_hit++; checks++;
      if (t1 - t0 != 2) begin failures++; $display("FAIL hit latency %0d", t1 - t0); end
    end else n_miss++;
    checks++;
    if (!we && resp_rdata !== (refm.exists(key) ? refm[key] : 16'h0)) begin
      failures++; $display("FAIL read line %0d idx %0d got %h", line, idx, resp_rdata); end
    if (we) refm[key] = v;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 3000; it++)
      op(1'($urandom), $urandom_range(20), $urandom_range(31), 16'($urandom));
    for (int l = 0; l <= 20; l++) for (int i = 0; i < 32; i += 7) op(0, l, i, 0);
    checks++; if (n_hit == 0 || n_miss == 0 || n_wb == 0) begin
      failures++; $display("FAIL coverage hit=%0d miss=%0d wb=%0d", n_hit, n_miss, n_wb); end
    $display("hits=%0d misses=%0d writebacks=%0d", n_hit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
