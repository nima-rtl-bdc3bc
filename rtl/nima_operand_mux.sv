// nima_operand_mux: input multiplexer in front of one FU or memory operand.
//
// In the NIMA data-path the wide register-file buses of a conventional
// processor are replaced by small multiplexers, one per operand. Each one
// chooses, under control of its field in the control word, between
//   code 0            the register-file read port assigned to this operand,
//   code 1            the constant field of the control word,
//   code 2 + g        output bus OMg (forwarding), only when FWD = 1.
// Unused codes give zero. Purely combinational. The source set follows the
// document's description of the base architecture (RF output, constant and
// forwarding links into every FU input); the code numbering is this design's.
module nima_operand_mux
  import nima_pkg::*;
#(
  parameter int unsigned XLEN = 32,
  parameter int unsigned N_OM = 4,     // number of output buses (RF write ports)
  parameter bit          FWD  = 1'b1,  // forwarding links present
  localparam int unsigned NSRC = FWD ? (SRC_OM0 + N_OM) : SRC_OM0,
  localparam int unsigned SW   = idx_w(NSRC)
) (
  input  logic [SW-1:0]             sel,
  input  logic [XLEN-1:0]           rf,
  input  logic [XLEN-1:0]           cnst,
  input  logic [N_OM-1:0][XLEN-1:0] om,
  output logic [XLEN-1:0]           y
);
  always_comb begin
    y = '0;
    if (int'(sel) == SRC_RF) begin
      y = rf;
    end else if (int'(sel) == SRC_CONST) begin
      y = cnst;
    end else if (FWD) begin
      for (int g = 0; g < int'(N_OM); g++)
        if (int'(sel) == SRC_OM0 + g) y = om[g];
    end
  end
endmodule
