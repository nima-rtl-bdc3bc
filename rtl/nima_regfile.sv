// nima_regfile: multi-port register file of the NIMA data-path.
//
// DEPTH registers of XLEN bits with NRP asynchronous read ports and NWP
// synchronous write ports ("RF 8x4" in the document's notation means 8 read
// by 4 write ports). Register 0 always reads zero, as in the MIPS data-path
// the design is derived from. A read in the same cycle as a write to the same
// register returns the old value; the data-path's forwarding links supply the
// new one. Two write ports must not write the same register in one cycle (an
// assertion checks this); if they do, the higher-numbered port wins. All
// registers clear on reset. The port counts follow the document (8x4 for the
// performance objective, 4x2 for the power and area objectives); the depth,
// register 0 and the same-cycle behaviour are this design's choices.
module nima_regfile #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned NRP   = 8,
  parameter int unsigned NWP   = 4,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NRP-1:0][AW-1:0]    raddr,
  output logic [NRP-1:0][XLEN-1:0]  rdata,
  input  logic [NWP-1:0]            we,
  input  logic [NWP-1:0][AW-1:0]    waddr,
  input  logic [NWP-1:0][XLEN-1:0]  wdata
);
  logic [DEPTH-1:0][XLEN-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < int'(NWP); p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int r = 0; r < int'(NRP); r++)
      rdata[r] = (raddr[r] == '0) ? '0 : regs[raddr[r]];
  end

  // Two write ports must not target the same register in the same cycle.
  for (genvar i = 0; i < NWP; i++) begin : g_chk_i
    for (genvar j = i + 1; j < NWP; j++) begin : g_chk_j
      a_no_wr_clash: assert property (@(posedge clk) disable iff (!rst_n)
        !(we[i] && we[j] && waddr[i] == waddr[j] && waddr[i] != '0));
    end
  end
endmodule
