// Self-checking test of cctag_ptr_tag: tag extraction, Top-Bits-Ignore
// address, and ptw/pts/ptc on random pointers, plus the document's example
// of pts with immediate 17 on a plain pointer.
module tb_cctag_ptr_tag;
  import cctag_pkg::*;
  logic [63:0] ptr, addr, result; pt_op_e op; logic [7:0] operand, tag;
  int checks = 0, failures = 0;

  cctag_ptr_tag dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [7:0] t, nt; logic [63:0] a, r;
      ptr = {$urandom, $urandom}; op = pt_op_e'($urandom_range(3)); operand = 8'($urandom);
      #1;
      t = ptr >> 48;
      a = ptr; for (int b = 48; b < 56; b++) a[b] = ptr[47];
      case (op)
        PT_WRITE: nt = operand;
        PT_SET:   nt = t | operand;
        PT_CLEAR: nt = t & ~operand;
        default:  nt = t;
      endcase
      r = (ptr & ~(64'hFF << 48)) | (64'(nt) << 48);
      checks++;
      if (tag !== t || addr !== a || result !== r) begin
        failures++; $display("FAIL ptr=%h op=%0d opd=%h", ptr, op, operand); end
    end
    ptr = 64'h0000_0000_0001_2340; op = PT_SET; operand = 8'd17; #1;
    checks++; if (result !== 64'h0011_0000_0001_2340 || addr !== ptr) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
