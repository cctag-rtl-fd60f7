// Self-checking test of cctag_policy_csr: reset state, write/readback of each
// policy CSR, independence of the four policies, granularity clamping and
// that unrelated addresses neither hit nor write.
// Policies off after reset follows the document; field layout, CSR numbers
// and clamping are this design's own.
module tb_cctag_policy_csr;
  import cctag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic csr_we = 0; logic [11:0] csr_addr = '0; logic [63:0] csr_wdata = '0;
  logic [63:0] csr_rdata; logic csr_hit;
  policy_cfg_t cfg [NPOL];
  int checks = 0, failures = 0;
  logic [30:0] shadow [NPOL];

  cctag_policy_csr dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); csr_we = 1; csr_addr = a; csr_wdata = d;
    @(negedge clk); csr_we = 0;
  endtask

  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPOL; p++) begin
      chk(cfg[p].enable == 1'b0 && cfg[p].mask == '0 && cfg[p].ld_check == MT_CHECK_NONE
          && cfg[p].st_update == S_NONE, "reset state");
      shadow[p] = '0; shadow[p][13:11] = 3'd2;
    end
    for (int it = 0; it < 40; it++) begin
      automatic int p = $urandom_range(NPOL-1);
      automatic logic [63:0] d = {$urandom, $urandom};
      automatic logic [30:0] e = d[30:0];
      if (e[13:11] < 3'd2) e[13:11] = 3'd2;
      if (e[13:11] > 3'd6) e[13:11] = 3'd6;
      wr(CSR_TAGPOL0 + 12'(p), d);
      shadow[p] = e;
      for (int q = 0; q < NPOL; q++) begin
        csr_addr = CSR_TAGPOL0 + 12'(q); #1;
        chk(csr_hit && csr_rdata == {33'd0, shadow[q]}, "readback");
        chk(31'(cfg[q]) == shadow[q], "cfg output");
      end
    end
    // Field placement: mask in bits 29..14, enable in bit 30.
    wr(CSR_TAGPOL0 + 12'd2, 64'h4000_0000 | (64'hAAAA << 14) | (64'd5 << 11));
    chk(cfg[2].enable && cfg[2].mask == 16'hAAAA && cfg[2].gran_log2 == 3'd5, "field layout");
    // Foreign address: no hit, no write.
    wr(12'h300, '1);
    csr_addr = 12'h300; #1; chk(!csr_hit && csr_rdata == '0, "foreign address");
    chk(cfg[2].mask == 16'hAAAA, "foreign write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
