// nima_addrm: Controller_addrM, the source of absolute jump addresses.
//
// Chooses the address the controller uses for an indirect jump (CTL_JIND):
// sel = 0 gives the link register (a return from a call), sel = 1 + g gives
// the low bits of output bus OMg (a jump to a computed address, such as a
// table entry loaded from memory). Selects beyond the buses give address 0.
// Purely combinational. The document shows this unit between the data-path
// and the controller's address input; its sources are this design's reading.
module nima_addrm #(
  parameter int unsigned PCW  = 8,
  parameter int unsigned XLEN = 32,
  parameter int unsigned N_OM = 4,
  localparam int unsigned SELW = $clog2(N_OM + 1)
) (
  input  logic [SELW-1:0]           sel,
  input  logic [PCW-1:0]            lr,
  input  logic [N_OM-1:0][XLEN-1:0] om,
  output logic [PCW-1:0]            addr
);
  always_comb begin
    addr = '0;
    if (sel == '0) begin
      addr = lr;
    end else begin
      for (int g = 0; g < int'(N_OM); g++)
        if (int'(sel) == g + 1) addr = om[g][PCW-1:0];
    end
  end
endmodule
