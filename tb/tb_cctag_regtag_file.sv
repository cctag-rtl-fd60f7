// Self-checking test of cctag_regtag_file against a reference array:
// random mixes of write-back, rtw/rts/rtc/rtr and CSR save/restore, with
// x0 required to stay zero throughout.
// Register-tag instructions follow the document; the save CSR and the
// port priority (CSR, then instruction, then write-back) are this design's own.
module tb_cctag_regtag_file;
  import cctag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1 = 0, ra2 = 0; logic [1:0] rd1, rd2;
  logic wb_en = 0; logic [4:0] wb_reg = 0; logic [1:0] wb_tag = 0;
  logic rt_en = 0; rt_op_e rt_op = RT_READ; logic [4:0] rt_reg = 0; logic [1:0] rt_val = 0;
  logic [1:0] rt_rdata; logic csr_we = 0; logic [63:0] csr_wdata = 0, csr_rdata;
  logic [1:0] model [32];
  int checks = 0, failures = 0;

  cctag_regtag_file dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      wb_en = 1'($urandom); wb_reg = 5'($urandom); wb_tag = 2'($urandom);
      rt_en = 1'($urandom); rt_op = rt_op_e'($urandom_range(3)); rt_reg = 5'($urandom); rt_val = 2'($urandom);
      if (rt_reg == wb_reg) rt_en = 0;
      csr_we = ($urandom_range(30) == 0); csr_wdata = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== model[ra1] || rd2 !== model[ra2] || rt_rdata !== model[rt_reg]) begin
        failures++; $display("FAIL read it=%0d", it); end
      for (int i = 0; i < 32; i++) if (csr_rdata[2*i +: 2] !== model[i]) begin
        failures++; $display("FAIL csr view reg %0d", i); break; end
      @(posedge clk);
      if (csr_we) for (int i = 1; i < 32; i++) model[i] = csr_wdata[2*i +: 2];
      else begin
        if (wb_en && wb_reg != 0) model[wb_reg] = wb_tag;
        if (rt_en && rt_reg != 0)
          case (rt_op)
            RT_WRITE: model[rt_reg] = rt_val;
            RT_SET:   model[rt_reg] = model[rt_reg] | rt_val;
            RT_CLEAR: model[rt_reg] = model[rt_reg] & ~rt_val;
            default: ;
          endcase
      end
      @(negedge clk);
    end
    ra1 = 0; #1; checks++; if (rd1 !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
