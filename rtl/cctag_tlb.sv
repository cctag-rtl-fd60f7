// cctag_tlb: fully associative data TLB whose entries also carry the 4-bit
// policy bitmap of their page. A set bit p activates tag policy p on every
// access to that page; a clear bit makes policy p's mask all zeros there
// (document). The bitmap arrives with the translation from the page-table
// walker through the refill port.
//
// Lookup is combinational: vpn in, hit/ppn/bitmap out in the same cycle.
// Refill writes one entry per clock: an entry already holding the VPN is
// overwritten, otherwise the first invalid entry, otherwise the entry chosen
// by a round-robin pointer (replacement choice is this design's own).
// flush (sfence.vma) invalidates every entry. ENTRIES = 32 and 4 KiB pages
// are assumed, as in an unmodified small core.
module cctag_tlb
  import cctag_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [VPNW-1:0] lk_vpn,
  output logic            lk_hit,
  output logic [PPNW-1:0] lk_ppn,
  output logic [NPOL-1:0] lk_bitmap,
  input  logic            refill_valid,
  input  logic [VPNW-1:0] refill_vpn,
  input  logic [PPNW-1:0] refill_ppn,
  input  logic [NPOL-1:0] refill_bitmap,
  input  logic            flush
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic            valid;
    logic [VPNW-1:0] vpn;
    logic [PPNW-1:0] ppn;
    logic [NPOL-1:0] bitmap;
  } tlb_entry_t;

  tlb_entry_t ent [ENTRIES];
  logic [IW-1:0] rr_q;
  logic [IW-1:0] wr_idx;

  always_comb begin
    lk_hit = 1'b0; lk_ppn = '0; lk_bitmap = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].valid && ent[i].vpn == lk_vpn) begin
        lk_hit = 1'b1; lk_ppn = ent[i].ppn; lk_bitmap = ent[i].bitmap;
      end
  end

  always_comb begin
    logic found;
    found  = 1'b0;
    wr_idx = rr_q;
    for (int i = 0; i < ENTRIES; i++)
      if (!found && ent[i].valid && ent[i].vpn == refill_vpn) begin found = 1'b1; wr_idx = IW'(i); end
    for (int i = 0; i < ENTRIES; i++)
      if (!found && !ent[i].valid) begin found = 1'b1; wr_idx = IW'(i); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      rr_q <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
    end else if (refill_valid) begin
      ent[wr_idx] <= '{valid: 1'b1, vpn: refill_vpn, ppn: refill_ppn, bitmap: refill_bitmap};
      if (wr_idx == rr_q) rr_q <= (32'(rr_q) == ENTRIES - 1) ? '0 : rr_q + 1'b1;
    end
  end

`ifndef SYNTHESIS
  // At most one entry may match a VPN.
  int n_match;
  always_comb begin
    n_match = 0;
    for (int i = 0; i < ENTRIES; i++) if (ent[i].valid && ent[i].vpn == lk_vpn) n_match++;
  end
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) n_match <= 1)
    else $error("cctag_tlb: duplicate VPN %h", lk_vpn);
`endif
endmodule
