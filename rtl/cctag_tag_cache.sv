// cctag_tag_cache: the small cache in front of the tag backing store inside
// the data tagger. It holds 64-byte lines of tag storage; one such line
// carries the 16-bit tags of 32 data lines, i.e. it covers 2 KiB of data, so
// a few kilobytes of tag cache cover a large memory range (document).
//
// Organisation: SETS x 4 ways x 64-byte lines, write-back, write-allocate.
// SETS = 8 is the 2 KiB configuration used for most measurements in the
// document (32 sets, 8 KiB, is the larger one). Replacement is tree
// pseudo-LRU with invalid ways first (design choice; the document names no
// policy for this cache).
//
// Request port (valid/ready): one 16-bit tag entry, selected by the tag-line
// address and the entry index inside the line, is read or written. A hit
// answers exactly 2 cycles after the request is accepted: the request is
// registered, looked up, and the result leaves through an output register
// (the document reports a 2-cycle delay). A miss first writes back a dirty victim, then fetches the
// line over the memory port and replays the lookup. Memory writes complete
// when accepted; a memory read completes with mem_rvalid.
module cctag_tag_cache
  import cctag_pkg::*;
#(
  parameter int unsigned SETS = 8,
  parameter int unsigned TLAW = 26   // tag-line address width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic [TLAW-1:0]       req_tladdr,
  input  logic [4:0]            req_idx,
  input  logic [TAGW-1:0]       req_wdata,
  output logic                  resp_valid,
  output logic [TAGW-1:0]       resp_rdata,
  output logic                  resp_was_hit,
  // tag backing store
  output logic                  mem_valid,
  input  logic                  mem_ready,
  output logic                  mem_we,
  output logic [TLAW-1:0]       mem_addr,
  output logic [TLINE_BITS-1:0] mem_wdata,
  input  logic                  mem_rvalid,
  input  logic [TLINE_BITS-1:0] mem_rdata
);
  localparam int unsigned WAYS = 4;
  localparam int unsigned SW   = (SETS > 1) ? $clog2(SETS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB, S_FILL, S_WAIT} state_e;
  state_e state_q;

  logic [TLINE_BITS-1:0] data [SETS][WAYS];
  logic [TLAW-1:0]       atag [SETS][WAYS];
  logic [WAYS-1:0]       vld  [SETS];
  logic [WAYS-1:0]       dty  [SETS];
  logic [2:0]            plru [SETS];

  logic                  we_q;
  logic [TLAW-1:0]       addr_q;
  logic [4:0]            idx_q;
  logic [TAGW-1:0]       wdata_q;
  logic                  missed_q;
  logic [1:0]            vway_q;

  logic [SW-1:0] set;
  logic          hit;
  logic [1:0]    hway, vway;

  assign set = SW'(addr_q % SETS);

  always_comb begin
    logic found;
    hit = 1'b0; hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set][w] && atag[set][w] == addr_q) begin hit = 1'b1; hway = 2'(w); end
    found = 1'b0;
    vway = plru4_victim(plru[set]);
    for (int w = 0; w < WAYS; w++)
      if (!found && !vld[set][w]) begin found = 1'b1; vway = 2'(w); end
  end

  assign req_ready = (state_q == S_IDLE);
  assign mem_valid = (state_q == S_WB) || (state_q == S_FILL);
  assign mem_we    = (state_q == S_WB);
  assign mem_addr  = (state_q == S_WB) ? atag[set][vway_q] : addr_q;
  assign mem_wdata = data[set][vway_q];

  // Line contents: no reset.
  always_ff @(posedge clk) begin
    if (state_q == S_LOOKUP && hit && we_q)
      data[set][hway][TAGW*idx_q +: TAGW] <= wdata_q;
    if (state_q == S_WAIT && mem_rvalid) begin
      data[set][vway_q] <= mem_rdata;
      atag[set][vway_q] <= addr_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      for (int s = 0; s < SETS; s++) begin vld[s] <= '0; dty[s] <= '0; plru[s] <= '0; end
      we_q <= 1'b0; addr_q <= '0; idx_q <= '0; wdata_q <= '0; missed_q <= 1'b0; vway_q <= '0;
      resp_valid <= 1'b0; resp_rdata <= '0; resp_was_hit <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          we_q <= req_we; addr_q <= req_tladdr; idx_q <= req_idx; wdata_q <= req_wdata;
          missed_q <= 1'b0;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            plru[set] <= plru4_touch(plru[set], hway);
            if (we_q) dty[set][hway] <= 1'b1;
            resp_valid   <= 1'b1;
            resp_rdata   <= data[set][hway][TAGW*idx_q +: TAGW];
            resp_was_hit <= !missed_q;
            state_q      <= S_IDLE;
          end else begin
            vway_q   <= vway;
            missed_q <= 1'b1;
            state_q  <= (vld[set][vway] && dty[set][vway]) ? S_WB : S_FILL;
          end
        end
        S_WB:   if (mem_ready) begin dty[set][vway_q] <= 1'b0; state_q <= S_FILL; end
        S_FILL: if (mem_ready) state_q <= S_WAIT;
        S_WAIT: if (mem_rvalid) begin
          vld[set][vway_q] <= 1'b1;
          dty[set][vway_q] <= 1'b0;
          state_q <= S_LOOKUP;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
