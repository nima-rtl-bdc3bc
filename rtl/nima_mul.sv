// nima_mul: 32-bit signed multiplier functional unit of the NIMA data-path.
//
// Purely combinational: y is the low XLEN bits of the signed product a * b
// (the low half is the same for signed and unsigned operands). The document
// sizes this unit (two instances) but does not describe its insides; a
// single-cycle multiplier returning the low word is this design's choice.
module nima_mul #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  // The low XLEN bits of a product do not depend on signedness.
  always_comb y = a * b;
endmodule
