// nima_sub: 32-bit subtractor functional unit of the NIMA data-path.
//
// Purely combinational: y = a - b, two's complement, wrapping on overflow.
// The document sizes this unit (two instances) but does not describe its
// insides; a single-cycle subtractor is this design's choice.
module nima_sub #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  always_comb y = a - b;
endmodule
