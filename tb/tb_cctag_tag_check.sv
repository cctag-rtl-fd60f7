// Self-checking test of cctag_tag_check with random tags and masks, compared
// bit by bit against an independent loop, plus directed cases: a mismatch
// must block the update, and an empty check mask always passes.
// The masked compare and masked update follow the document's tag check
// description.
module tb_cctag_tag_check;
  import cctag_pkg::*;
  logic [15:0] cur_tag, chk_mask, chk_val, upd_mask, upd_val, bad_bits, new_tag;
  logic mismatch, do_write;
  int checks = 0, failures = 0;

  cctag_tag_check dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      logic [15:0] en; bit mm; logic [15:0] nt;
      cur_tag = 16'($urandom); chk_mask = 16'($urandom) & 16'($urandom);
      chk_val = (it % 2) ? cur_tag ^ (16'($urandom) & 16'($urandom) & 16'($urandom)) : 16'($urandom);
      upd_mask = 16'($urandom); upd_val = 16'($urandom);
      #1;
      mm = 0;
      for (int i = 0; i < 16; i++) begin
        if (chk_mask[i] && cur_tag[i] != chk_val[i]) mm = 1;
        nt[i] = upd_mask[i] ? upd_val[i] : cur_tag[i];
      end
      checks++;
      if (mismatch !== mm || new_tag !== nt || do_write !== (!mm && upd_mask != 0)) begin
        failures++;
        $display("FAIL cur=%h cm=%h cv=%h um=%h uv=%h -> mm=%b nt=%h wr=%b", cur_tag, chk_mask,
                 chk_val, upd_mask, upd_val, mismatch, new_tag, do_write);
      end
    end
    cur_tag = 16'h0040; chk_mask = 16'h0040; chk_val = 16'h0; upd_mask = 16'h0080; upd_val = '0; #1;
    checks++; if (!mismatch || do_write || bad_bits !== 16'h0040) failures++;
    chk_mask = '0; #1;
    checks++; if (mismatch || !do_write) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
