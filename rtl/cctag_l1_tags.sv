// cctag_l1_tags: the tag extension of the data cache. Every cache line gets
// its 16-bit memory tag plus two state bits (document):
//   tag valid  the line's tag was fetched or fully written, so it may be used;
//   tag dirty  the tag was modified and must be written back on eviction.
// A line filled for an access that needs no tag work is installed with tag
// valid clear, so no tag traffic happens for it; its tag is fetched only
// when a later access needs it. An evicted line with a clean tag is written
// back without its tag.
//
// Organisation: SETS x 4 ways, 64-byte lines, tree pseudo-LRU replacement
// (the document's D-cache uses PLRU). Only the address tags and memory tags
// are held here; the data array belongs to the host cache. Lookup is
// combinational; one write per clock installs or updates a line and marks
// it most recently used. touch marks a hit way used without writing.
// SETS = 256 gives the 64 KiB cache size the document quotes for the L1.
module cctag_l1_tags
  import cctag_pkg::*;
#(
  parameter int unsigned SETS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [LADDRW-1:0] lk_laddr,
  output logic              lk_hit,
  output logic [1:0]        lk_way,
  output logic [TAGW-1:0]   lk_tag,
  output logic              lk_tv,
  output logic              lk_td,
  // replacement candidate of the looked-up set
  output logic [1:0]        vic_way,
  output logic              vic_valid,
  output logic [LADDRW-1:0] vic_laddr,
  output logic [TAGW-1:0]   vic_tag,
  output logic              vic_td,
  // install / update
  input  logic              wr_en,
  input  logic [LADDRW-1:0] wr_laddr,
  input  logic [1:0]        wr_way,
  input  logic [TAGW-1:0]   wr_tag,
  input  logic              wr_tv,
  input  logic              wr_td,
  input  logic              touch_en,
  input  logic [LADDRW-1:0] touch_laddr,
  input  logic [1:0]        touch_way
);
  localparam int unsigned WAYS = 4;
  localparam int unsigned SW   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned ATW  = LADDRW - SW;

  typedef struct packed {
    logic [ATW-1:0]  atag;
    logic [TAGW-1:0] tag;
    logic            tv;
    logic            td;
  } line_t;

  // Line contents have no reset; only the valid and PLRU bits do.
  line_t           arr  [SETS][WAYS];
  logic [WAYS-1:0] vld  [SETS];
  logic [2:0]      plru [SETS];

  function automatic logic [SW-1:0] set_of(input logic [LADDRW-1:0] a);
    return SW'(a % SETS);
  endfunction
  function automatic logic [ATW-1:0] atag_of(input logic [LADDRW-1:0] a);
    return ATW'(a / SETS);
  endfunction

  always_comb begin
    logic [SW-1:0] s;
    logic found_inv;
    s = set_of(lk_laddr);
    lk_hit = 1'b0; lk_way = '0; lk_tag = '0; lk_tv = 1'b0; lk_td = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (vld[s][w] && arr[s][w].atag == atag_of(lk_laddr)) begin
        lk_hit = 1'b1; lk_way = 2'(w);
        lk_tag = arr[s][w].tag; lk_tv = arr[s][w].tv; lk_td = arr[s][w].td;
      end
    found_inv = 1'b0;
    vic_way = plru4_victim(plru[s]);
    for (int w = 0; w < WAYS; w++)
      if (!found_inv && !vld[s][w]) begin found_inv = 1'b1; vic_way = 2'(w); end
    vic_valid = vld[s][vic_way];
    vic_laddr = LADDRW'(arr[s][vic_way].atag) * LADDRW'(SETS) + LADDRW'(s);
    vic_tag   = arr[s][vic_way].tag;
    vic_td    = arr[s][vic_way].td;
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      arr[set_of(wr_laddr)][wr_way] <= '{atag: atag_of(wr_laddr), tag: wr_tag, tv: wr_tv, td: wr_td};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        plru[s] <= '0;
        vld[s]  <= '0;
      end
    end else begin
      if (touch_en)
        plru[set_of(touch_laddr)] <= plru4_touch(plru[set_of(touch_laddr)], touch_way);
      if (wr_en) begin
        vld[set_of(wr_laddr)][wr_way] <= 1'b1;
        plru[set_of(wr_laddr)] <= plru4_touch(plru[set_of(wr_laddr)], wr_way);
      end
    end
  end
endmodule
