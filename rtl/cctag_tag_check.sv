// cctag_tag_check: the data-cache side of a tag operation. It compares the
// current 16-bit line tag with the expected value under the check mask and,
// when nothing mismatches, merges the update value under the update mask.
// A mismatch raises the tag-check exception and suppresses the update, so
// the faulting instruction leaves no trace (document). Purely
// combinational; the caller writes new_tag back when do_write is set.
module cctag_tag_check
  import cctag_pkg::*;
(
  input  logic [TAGW-1:0] cur_tag,
  input  logic [TAGW-1:0] chk_mask,
  input  logic [TAGW-1:0] chk_val,
  input  logic [TAGW-1:0] upd_mask,
  input  logic [TAGW-1:0] upd_val,
  output logic            mismatch,
  output logic [TAGW-1:0] bad_bits,   // which checked bits differ
  output logic [TAGW-1:0] new_tag,
  output logic            do_write    // update needed and allowed
);
  always_comb begin
    bad_bits = (cur_tag ^ chk_val) & chk_mask;
    mismatch = |bad_bits;
    new_tag  = (cur_tag & ~upd_mask) | (upd_val & upd_mask);
    do_write = !mismatch && (|upd_mask);
  end
endmodule
