// cctag_policy_csr: supervisor CSRs that hold the tag policies.
//
// One CSR per policy (CSR_TAGPOL0 + p) stores a policy_cfg_t in bits 30..0:
// enable, 16-bit policy mask, granularity, load and store check rules with
// their check values, the load-propagate flag, the store update rule and the
// ALU propagation rule. The kernel rewrites them on a context switch, which
// makes them per-thread. After reset every policy is disabled, so no check
// or update happens until software configures one (document). Writes take
// effect on the next clock edge; reads are combinational. A granularity
// outside 4..64 bytes is clamped into that range on write (design choice),
// and bits 63..31 read as zero; written values of those bits are ignored,
// which leaves csr_wdata[63:31] unused.
module cctag_policy_csr
  import cctag_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        csr_we,
  input  logic [11:0] csr_addr,
  input  logic [63:0] csr_wdata,
  output logic [63:0] csr_rdata,
  output logic        csr_hit,      // address belongs to this block
  output policy_cfg_t cfg [NPOL]
);
  policy_cfg_t pol_q [NPOL];

  function automatic policy_cfg_t sanitize(input logic [POLCFGW-1:0] w);
    policy_cfg_t c;
    c = policy_cfg_t'(w);
    if (c.gran_log2 < 3'd2) c.gran_log2 = 3'd2;
    if (c.gran_log2 > 3'd6) c.gran_log2 = 3'd6;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPOL; p++) pol_q[p] <= POL_OFF;
    end else if (csr_we) begin
      for (int p = 0; p < NPOL; p++)
        if (csr_addr == CSR_TAGPOL0 + 12'(p)) pol_q[p] <= sanitize(csr_wdata[POLCFGW-1:0]);
    end
  end

  always_comb begin
    csr_rdata = '0;
    csr_hit   = 1'b0;
    for (int p = 0; p < NPOL; p++) begin
      cfg[p] = pol_q[p];
      if (csr_addr == CSR_TAGPOL0 + 12'(p)) begin
        csr_hit   = 1'b1;
        csr_rdata = 64'(pol_q[p]);
      end
    end
  end
endmodule
