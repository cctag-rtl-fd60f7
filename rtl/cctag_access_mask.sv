// cctag_access_mask: which of the 16 line-tag bits one memory access touches
// for one policy.
//
// A line tag gives one bit to every 4 data bytes. A policy with granularity
// 2^g bytes owns 2^(g-2) consecutive tag bits per granule. The mask covers
// the granule holding the access; when the access is wider than the
// granule, the larger of the two sizes is used, so a coarse access performs
// every finer sub-unit operation (document rule). Granularities below
// 4 bytes are raised to 4 bytes, the finest a tag bit can resolve (design
// choice). Purely combinational.
//
//   off       byte offset of the access inside its 64-byte line
//   size_log2 access size 2^n bytes, n = 0..3 (byte .. doubleword)
//   gran_log2 policy granularity 2^n bytes, n = 2..6
//   mask      tag bits selected (before AND with the policy mask)
module cctag_access_mask
  import cctag_pkg::*;
(
  input  logic [LINE_OFFW-1:0] off,
  input  logic [1:0]           size_log2,
  input  logic [2:0]           gran_log2,
  output logic [TAGW-1:0]      mask
);
  int unsigned eff;

  always_comb begin
    eff = 2;
    if (32'(size_log2) > eff) eff = 32'(size_log2);
    if (32'(gran_log2) > eff) eff = 32'(gran_log2);
    if (eff > LINE_OFFW) eff = LINE_OFFW;  // a granule never exceeds the line
    mask = block_mask(off, eff);
  end
endmodule
