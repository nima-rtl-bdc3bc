// nima_adder: 32-bit signed adder functional unit of the NIMA data-path.
//
// Purely combinational: y = a + b, two's complement, wrapping on overflow.
// The document sizes this unit (four instances in every objective) but does
// not describe its insides; a single-cycle adder is this design's choice.
// Pipeline registers around it belong to nima_fu_slot.
module nima_adder #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  always_comb y = a + b;
endmodule
