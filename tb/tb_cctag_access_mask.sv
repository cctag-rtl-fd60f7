// Self-checking test of cctag_access_mask: every offset, size and
// granularity is compared with a bit-by-bit reference that marks tag bit i
// when the 4-byte chunk i lies in the same aligned block as the access.
// The rule (larger of access size and granularity, 4 bytes per tag bit)
// follows the document; the exhaustive sweep is this test's own.
module tb_cctag_access_mask;
  import cctag_pkg::*;
  logic [5:0]  off;
  logic [1:0]  sz;
  logic [2:0]  gr;
  logic [15:0] mask;
  int checks = 0, failures = 0;

  cctag_access_mask dut (.off(off), .size_log2(sz), .gran_log2(gr), .mask(mask));

  function automatic logic [15:0] ref_mask(int o, int s, int g);
    int e, base; logic [15:0] m;
    e = (s > g) ? s : g; if (e < 2) e = 2; if (e > 6) e = 6;
    base = (o / (1 << e)) * (1 << e);
    m = '0;
    for (int i = 0; i < 16; i++)
      if (i*4 >= base && i*4 < base + (1 << e)) m[i] = 1'b1;
    return m;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int g = 0; g <= 6; g++)
      for (int s = 0; s < 4; s++)
        for (int o = 0; o < 64; o += (1 << s)) begin
          off = 6'(o); sz = 2'(s); gr = 3'(g); #1;
          checks++;
          if (mask !== ref_mask(o, s, g)) begin
            failures++;
            $display("FAIL off=%0d size=%0d gran=%0d mask=%h exp=%h", o, s, g, mask, ref_mask(o, s, g));
          end
        end
    // Document examples: 1 bit / 4 B, 8 bits / 32 B, 16 bits / 64 B.
    off = 6'd36; sz = 2'd0; gr = 3'd2; #1; checks++; if (mask !== 16'h0200) failures++;
    off = 6'd36; sz = 2'd0; gr = 3'd5; #1; checks++; if (mask !== 16'hFF00) failures++;
    off = 6'd36; sz = 2'd0; gr = 3'd6; #1; checks++; if (mask !== 16'hFFFF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
