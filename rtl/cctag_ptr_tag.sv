// cctag_ptr_tag: pointer-tag handling. Bits 55..48 of a 64-bit pointer hold
// an 8-bit tag. For address generation those bits are ignored (Top Bits
// Ignore): the returned address has them replaced by copies of bit 47, so
// the rest of the core sees a canonical address. The same block executes
// the pointer-tag instructions ptw (write the tag), pts (OR bits into it)
// and ptc (clear bits from it), which build the pointers that select a
// memory colour or arm a conditional check. Bit positions and instruction
// names follow the document; filling the ignored bits with bit 47 is this
// design's choice. Purely combinational. Outside bits 55..48 both addr and
// result are the input pointer unchanged, so those output bits follow ptr
// directly.
module cctag_ptr_tag
  import cctag_pkg::*;
(
  input  logic [63:0]      ptr,
  input  pt_op_e           op,
  input  logic [PTAGW-1:0] operand,
  output logic [PTAGW-1:0] tag,       // tag carried by ptr
  output logic [63:0]      addr,      // ptr with the tag bits ignored
  output logic [63:0]      result     // ptr after the pointer-tag instruction
);
  localparam int unsigned HI = PTAG_LSB + PTAGW - 1;

  always_comb begin
    logic [PTAGW-1:0] nt;
    tag  = ptr[HI:PTAG_LSB];
    addr = ptr;
    addr[HI:PTAG_LSB] = {PTAGW{ptr[PTAG_LSB-1]}};
    unique case (op)
      PT_NONE:  nt = tag;
      PT_WRITE: nt = operand;
      PT_SET:   nt = tag | operand;
      PT_CLEAR: nt = tag & ~operand;
    endcase
    result = ptr;
    result[HI:PTAG_LSB] = nt;
  end
endmodule
