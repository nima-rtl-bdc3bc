// nima_comp: comparator functional unit of the NIMA data-path.
//
// Combinational. Compares a with b as chosen by op (nima_pkg::cmp_op_e:
// equal, not equal, signed and unsigned less-than and greater-or-equal,
// signed less-or-equal and greater-than) and returns 1 or 0 in bit 0 of y,
// other bits zero, so the result can be written to the register file or
// loaded into the controller's status register. The document sizes this unit
// (one instance) and calls it a signed 32-bit compare; the operation set is
// this design's choice.
module nima_comp
  import nima_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  cmp_op_e         op,
  output logic [XLEN-1:0] y
);
  logic r;
  always_comb begin
    unique case (op)
      CMP_EQ:  r = (a == b);
      CMP_NE:  r = (a != b);
      CMP_LT:  r = (signed'(a) <  signed'(b));
      CMP_GE:  r = (signed'(a) >= signed'(b));
      CMP_LTU: r = (a < b);
      CMP_GEU: r = (a >= b);
      CMP_LE:  r = (signed'(a) <= signed'(b));
      CMP_GT:  r = (signed'(a) >  signed'(b));
      default: r = 1'b0;
    endcase
    y = {{(XLEN-1){1'b0}}, r};
  end
endmodule
