// cctag_pkg: shared constants, encodings and types of the CCTAG tag extension.
//
// A 64-byte data line carries a 16-bit memory tag (a fixed 1:32 tag ratio, so
// one tag bit stands for 4 data bytes). A tag policy picks a granularity from
// 4 to 64 bytes and a 16-bit policy mask; the bits the policy owns inside one
// granule are the intersection of the two. Up to four policies run at once,
// each enabled per page by a 4-bit bitmap held in the TLB. Pointers carry an
// 8-bit tag in bits 55..48 and each integer register a 2-bit tag (the same
// 1:32 ratio applied to an 8-byte register).
//
// The rule encodings follow the document's rule table; their numeric codes,
// the CSR addresses and the CSR field layout are this design's own choices.
package cctag_pkg;

  localparam int unsigned NPOL      = 4;   // tag policies
  localparam int unsigned TAGW      = 16;  // tag bits per 64-byte line
  localparam int unsigned LINE_OFFW = 6;
  localparam int unsigned PTAGW     = 8;   // pointer tag width
  localparam int unsigned PTAG_LSB  = 48;  // pointer tag occupies bits 55..48
  localparam int unsigned RTAGW     = 2;   // register tag width
  localparam int unsigned NREGS     = 32;
  localparam int unsigned PADDRW    = 32;  // physical address width
  localparam int unsigned VADDRW    = 39;  // Sv39 virtual address width
  localparam int unsigned PGOFFW    = 12;
  localparam int unsigned VPNW      = VADDRW - PGOFFW;  // 27
  localparam int unsigned PPNW      = PADDRW - PGOFFW;  // 20
  localparam int unsigned LADDRW    = PADDRW - LINE_OFFW; // line address width
  localparam int unsigned TLINE_BITS = 512; // tag-cache line = 64 bytes of tags

  // Supervisor custom read/write CSR addresses (0x5C0-0x5FF range).
  localparam logic [11:0] CSR_TAGPOL0  = 12'h5C0;  // .. 0x5C3, one per policy
  localparam logic [11:0] CSR_RTAGSAVE = 12'h5C8;  // all register tags, 2 bits each

  // Memory-tag check rule, chosen separately for loads and stores.
  typedef enum logic [1:0] {
    MT_CHECK_NONE   = 2'd0,  // no check
    MT_CHECK_EQUAL  = 2'd1,  // memory tag must equal the (repeated) pointer tag
    MT_CHECK_UNCOND = 2'd2,  // memory tag bits must equal the check value
    MT_CHECK_COND   = 2'd3   // as UNCOND, only where the pointer-tag bit is 1
  } chk_rule_e;

  // Memory-tag update rule on stores.
  typedef enum logic [1:0] {
    S_NONE  = 2'd0,
    S_SET   = 2'd1,
    S_UNSET = 2'd2,
    S_PROP  = 2'd3   // register tag of the stored register goes to memory
  } st_rule_e;

  // Register-tag propagation through ALU instructions.
  typedef enum logic [1:0] {
    ALU_PROP_NONE   = 2'd0,  // result tag is zero
    ALU_PROP_OR     = 2'd1,  // OR of source tags on every arithmetic op (taint)
    ALU_PROP_XOR_AS = 2'd2   // XOR of source tags on ADD/SUB only (pointer tracking)
  } alu_prop_e;

  typedef enum logic [1:0] {
    ALU_CLS_ADD   = 2'd0,
    ALU_CLS_SUB   = 2'd1,
    ALU_CLS_ARITH = 2'd2,  // any other arithmetic/logic op
    ALU_CLS_NONE  = 2'd3   // no tag-carrying result (e.g. lui, csr)
  } alu_cls_e;

  // One policy; bits [30:0] of its CSR in this order (MSB first).
  typedef struct packed {
    logic            enable;       // [30]
    logic [TAGW-1:0] mask;         // [29:14]
    logic [2:0]      gran_log2;    // [13:11] granularity 2^n bytes, n = 2..6
    chk_rule_e       ld_check;     // [10:9]
    logic            ld_check_val; // [8]
    chk_rule_e       st_check;     // [7:6]
    logic            st_check_val; // [5]
    logic            l_prop;       // [4] load copies memory tag to register tag
    st_rule_e        st_update;    // [3:2]
    alu_prop_e       alu_prop;     // [1:0]
  } policy_cfg_t;

  localparam int unsigned POLCFGW = $bits(policy_cfg_t);

  // Reset value of a policy: disabled, no rules, 4-byte granularity.
  localparam policy_cfg_t POL_OFF = policy_cfg_t'(31'(2) << 11);

  // Operations of the tag-aware memory port.
  typedef enum logic [3:0] {
    OP_LOAD  = 4'd0,
    OP_STORE = 4'd1,
    OP_LDP   = 4'd2,  // load copying the memory tag regardless of page settings
    OP_SDP   = 4'd3,  // store copying the register tag regardless of page settings
    OP_MTRD  = 4'd4,  // read the 2 tag bits of an 8-byte word
    OP_MTWD  = 4'd5,  // write them
    OP_MTSD  = 4'd6,  // set selected ones
    OP_MTCD  = 4'd7,  // clear selected ones
    OP_MTR   = 4'd8,  // read the whole 16-bit line tag
    OP_MTW   = 4'd9   // write the whole 16-bit line tag
  } mem_op_e;

  // Register-tag instructions.
  typedef enum logic [1:0] {
    RT_READ  = 2'd0,  // rtr
    RT_WRITE = 2'd1,  // rtw
    RT_SET   = 2'd2,  // rts
    RT_CLEAR = 2'd3   // rtc
  } rt_op_e;

  // Pointer-tag instructions.
  typedef enum logic [1:0] {
    PT_NONE  = 2'd0,
    PT_WRITE = 2'd1,  // ptw
    PT_SET   = 2'd2,  // pts
    PT_CLEAR = 2'd3   // ptc
  } pt_op_e;

  // Mask of the tag bits covering one aligned block of 2^eff bytes at offset off.
  function automatic logic [TAGW-1:0] block_mask(input logic [LINE_OFFW-1:0] off,
                                                 input int unsigned eff);
    int unsigned nbits, start;
    logic [31:0] ones;
    nbits = 32'd1 << (eff - 2);
    start = (32'(off) >> eff) << (eff - 2);
    ones  = (32'd1 << nbits) - 32'd1;
    return TAGW'(ones << start);
  endfunction

  // Tree pseudo-LRU for four ways: 3 bits per set.
  // bit0 chooses the half (0: ways 0/1 are older), bit1 within 0/1, bit2 within 2/3.
  function automatic logic [1:0] plru4_victim(input logic [2:0] s);
    if (!s[0]) return {1'b0, s[1]};
    else       return {1'b1, s[2]};
  endfunction

  function automatic logic [2:0] plru4_touch(input logic [2:0] s, input logic [1:0] way);
    logic [2:0] n;
    n = s;
    n[0] = ~way[1];           // point away from the touched half
    if (!way[1]) n[1] = ~way[0];
    else         n[2] = ~way[0];
    return n;
  endfunction

endpackage
