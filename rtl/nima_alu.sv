// nima_alu: bitwise-logic and shift functional unit of the NIMA data-path.
//
// Combinational. Carries the operations of the benchmark that are not add,
// subtract, multiply or compare: AND, OR, XOR, NOR, shift left logical,
// shift right logical and arithmetic (shift amount = low bits of b), and a
// pass-through of a (nima_pkg::alu_op_e). The document shows one ALU in its
// base architecture and lists these operation kinds in its benchmark usage
// table; the exact operation set and encoding are this design's choice.
module nima_alu
  import nima_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  output logic [XLEN-1:0] y
);
  localparam int unsigned SHW = $clog2(XLEN);
  logic [SHW-1:0] sh;
  always_comb begin
    sh = b[SHW-1:0];
    unique case (op)
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLL:  y = a << sh;
      ALU_SRL:  y = a >> sh;
      ALU_SRA:  y = XLEN'(signed'(a) >>> sh);
      ALU_PASS: y = a;
      default:  y = a;
    endcase
  end
endmodule
