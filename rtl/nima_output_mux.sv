// nima_output_mux: the output bus multiplexer (OM) of one FU group.
//
// The NIMA data-path splits its result producers (FUs and memory read ports)
// into as many groups as the register file has input (write) ports, handing
// them out round robin. Each group's OM puts the result of one member, chosen
// by the control word, on its output bus; that bus feeds one RF write port
// and, through the forwarding links, every operand multiplexer. Purely
// combinational; a select beyond the group's size gives zero. The grouping
// and the bus follow the document; the select coding is this design's.
module nima_output_mux #(
  parameter int unsigned XLEN = 32,
  parameter int unsigned N_IN = 3,   // members of the group
  localparam int unsigned SELW = (N_IN <= 1) ? 1 : $clog2(N_IN)
) (
  input  logic [SELW-1:0]           sel,
  input  logic [N_IN-1:0][XLEN-1:0] d,
  output logic [XLEN-1:0]           y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < int'(N_IN); i++)
      if (int'(sel) == i) y = d[i];
  end
endmodule
