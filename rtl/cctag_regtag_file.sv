// cctag_regtag_file: the 2-bit tag of each of the 32 integer registers.
// x0 always reads tag 0. Tags travel with register values:
//  * wb port     writes the tag of an instruction result (a load's tag from
//                memory, an ALU result's propagated tag);
//  * rt port     executes rtr (read a tag into a GPR value), rtw (write),
//                rts (set bits) and rtc (clear bits);
//  * snapshot    a 64-bit view of all tags (register i in bits 2i+1..2i)
//                that the kernel saves and restores on traps through the
//                CSR_RTAGSAVE supervisor CSR.
// Two combinational read ports feed ALU propagation and stores. Writes land
// on the clock edge; if two writes hit one register in a cycle the CSR
// restore wins over rt, which wins over wb (design choice). Reset clears
// every tag (the document has the kernel zero tags of fresh memory; zero
// register tags at reset are this design's choice).
module cctag_regtag_file
  import cctag_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [4:0]       ra1,
  output logic [RTAGW-1:0] rd1,
  input  logic [4:0]       ra2,
  output logic [RTAGW-1:0] rd2,
  input  logic             wb_en,
  input  logic [4:0]       wb_reg,
  input  logic [RTAGW-1:0] wb_tag,
  input  logic             rt_en,
  input  rt_op_e           rt_op,
  input  logic [4:0]       rt_reg,
  input  logic [RTAGW-1:0] rt_val,
  output logic [RTAGW-1:0] rt_rdata,    // rtr result (current tag)
  input  logic             csr_we,      // CSR_RTAGSAVE write (restore)
  input  logic [63:0]      csr_wdata,
  output logic [63:0]      csr_rdata    // CSR_RTAGSAVE read (save)
);
  logic [RTAGW-1:0] tags_q [NREGS];

  always_comb begin
    rd1      = tags_q[ra1];
    rd2      = tags_q[ra2];
    rt_rdata = tags_q[rt_reg];
    for (int i = 0; i < NREGS; i++) csr_rdata[RTAGW*i +: RTAGW] = tags_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) tags_q[i] <= '0;
    end else begin
      if (wb_en && wb_reg != 5'd0) tags_q[wb_reg] <= wb_tag;
      if (rt_en && rt_reg != 5'd0) begin
        unique case (rt_op)
          RT_READ:  ;
          RT_WRITE: tags_q[rt_reg] <= rt_val;
          RT_SET:   tags_q[rt_reg] <= tags_q[rt_reg] | rt_val;
          RT_CLEAR: tags_q[rt_reg] <= tags_q[rt_reg] & ~rt_val;
        endcase
      end
      if (csr_we)
        for (int i = 1; i < NREGS; i++) tags_q[i] <= csr_wdata[RTAGW*i +: RTAGW];
    end
  end
endmodule
