// cctag_data_tagger: sits between the cache side and memory and adds tags to
// line transfers. The tags of all memory live in a reserved region of DRAM
// (16 bits per 64-byte line, 1/32 of memory, document); the entry of data
// line L is the 16-bit word at TAG_BASE + 2*L. Each request carries a
// need-tag bit (document): without it only the data transfer is made, with
// it the tag is read (acquire) or written (release) through the tag cache at
// the same time as the data transfer. A need-data bit allows tag-only
// transfers (design choice): fetching the tag of a line already cached
// without its tag, or writing back a dirty tag. The response comes when
// every requested part is done.
//
// Ports are plain valid/ready handshakes standing in for the on-chip bus
// (design choice); the data payload itself is carried by the host bus and is
// not modelled here, only the data request and its completion. TAG_BASE
// places the tag region in the top 1/32 of a 4 GiB physical space (design
// choice). One request is handled at a time. Tag entries are 16-bit words,
// so bit 0 of the tag byte address is always zero and is not used.
// Timing: a request is taken in the idle state; its data and tag parts are
// issued together on the next cycle; the cycle after both have completed
// the state machine enters its response state, and resp_valid is high for
// the one cycle after that.
module cctag_data_tagger
  import cctag_pkg::*;
#(
  parameter logic [PADDRW-1:0] TAG_BASE = 32'hF800_0000,
  parameter int unsigned       TC_SETS  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // cache side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,        // 1: release (write-back), 0: acquire
  input  logic [LADDRW-1:0]     req_laddr,
  input  logic                  req_need_tag,
  input  logic                  req_need_data, // 0: tag-only transfer
  input  logic [TAGW-1:0]       req_tag,
  output logic                  resp_valid,
  output logic [TAGW-1:0]       resp_tag,
  output logic                  resp_tag_hit,  // tag came from the tag cache without a refill
  // data memory
  output logic                  dmem_valid,
  input  logic                  dmem_ready,
  output logic                  dmem_we,
  output logic [LADDRW-1:0]     dmem_laddr,
  input  logic                  dmem_done,
  // tag memory
  output logic                  tmem_valid,
  input  logic                  tmem_ready,
  output logic                  tmem_we,
  output logic [LADDRW-1:0]     tmem_addr,     // tag-line address
  output logic [TLINE_BITS-1:0] tmem_wdata,
  input  logic                  tmem_rvalid,
  input  logic [TLINE_BITS-1:0] tmem_rdata
);
  typedef enum logic [1:0] {T_IDLE, T_BUSY, T_RESP} state_e;
  state_e state_q;

  logic                 we_q, need_q;
  logic [LADDRW-1:0]    laddr_q;
  logic [TAGW-1:0]      tag_q;
  logic                 d_issued_q, d_done_q, t_issued_q, t_done_q;
  logic [TAGW-1:0]      rtag_q;
  logic                 thit_q;

  logic [PADDRW-1:0]    tag_byte;
  logic                 tc_req_valid, tc_req_ready, tc_resp_valid, tc_resp_hit;
  logic [TAGW-1:0]      tc_resp_rdata;

  assign tag_byte = TAG_BASE + PADDRW'({laddr_q, 1'b0});

  cctag_tag_cache #(.SETS(TC_SETS), .TLAW(LADDRW)) u_tc (
    .clk, .rst_n,
    .req_valid(tc_req_valid), .req_ready(tc_req_ready), .req_we(we_q),
    .req_tladdr(tag_byte[PADDRW-1:LINE_OFFW]), .req_idx(tag_byte[LINE_OFFW-1:1]),
    .req_wdata(tag_q),
    .resp_valid(tc_resp_valid), .resp_rdata(tc_resp_rdata), .resp_was_hit(tc_resp_hit),
    .mem_valid(tmem_valid), .mem_ready(tmem_ready), .mem_we(tmem_we), .mem_addr(tmem_addr),
    .mem_wdata(tmem_wdata), .mem_rvalid(tmem_rvalid), .mem_rdata(tmem_rdata)
  );

  assign req_ready    = (state_q == T_IDLE);
  assign dmem_valid   = (state_q == T_BUSY) && !d_issued_q;
  assign dmem_we      = we_q;
  assign dmem_laddr   = laddr_q;
  assign tc_req_valid = (state_q == T_BUSY) && need_q && !t_issued_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= T_IDLE;
      we_q <= 1'b0; need_q <= 1'b0; laddr_q <= '0; tag_q <= '0;
      d_issued_q <= 1'b0; d_done_q <= 1'b0; t_issued_q <= 1'b0; t_done_q <= 1'b0;
      rtag_q <= '0; thit_q <= 1'b0;
      resp_valid <= 1'b0; resp_tag <= '0; resp_tag_hit <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        T_IDLE: if (req_valid) begin
          we_q <= req_we; need_q <= req_need_tag; laddr_q <= req_laddr; tag_q <= req_tag;
          d_issued_q <= !req_need_data; d_done_q <= !req_need_data;
          t_issued_q <= 1'b0; t_done_q <= !req_need_tag;
          rtag_q <= '0; thit_q <= 1'b0;
          state_q <= T_BUSY;
        end
        T_BUSY: begin
          if (dmem_valid && dmem_ready) d_issued_q <= 1'b1;
          if (dmem_done) d_done_q <= 1'b1;
          if (tc_req_valid && tc_req_ready) t_issued_q <= 1'b1;
          if (tc_resp_valid) begin t_done_q <= 1'b1; rtag_q <= tc_resp_rdata; thit_q <= tc_resp_hit; end
          if ((d_done_q || dmem_done) && (t_done_q || tc_resp_valid)) state_q <= T_RESP;
        end
        T_RESP: begin
          resp_valid   <= 1'b1;
          resp_tag     <= (need_q && !we_q) ? rtag_q : '0;
          resp_tag_hit <= need_q && thit_q;
          state_q      <= T_IDLE;
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // Data requests must not address the reserved tag region.
  a_no_tag_region: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> ({req_laddr, 6'd0} < TAG_BASE))
    else $error("cctag_data_tagger: data access inside tag region");
`endif
endmodule
