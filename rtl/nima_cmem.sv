// nima_cmem: control memory (CMem) and control-word register (CW).
//
// A NISC processor keeps no instructions, only control words: one word per
// cycle, each wide enough to drive every unit of the data-path. CMem holds
// DEPTH words of CW_W bits, written through a load port (we/waddr/wdata)
// before the program runs. Each cycle, unless hold is high, the word at the
// fetch address is copied into the CW register, whose output drives the
// data-path in the following cycle. Reset clears the CW register, and an
// all-zero word is a no-operation. CMem and the CW register follow the
// document's base architecture; the load port, the hold input and the depth
// are this design's choices.
module nima_cmem #(
  parameter int unsigned CW_W  = 223,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // load port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CW_W-1:0]  wdata,
  // fetch
  input  logic [AW-1:0]    raddr,
  input  logic             hold,
  output logic [CW_W-1:0]  cw
);
  logic [CW_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cw <= '0;
    else if (!hold) cw <= mem[raddr];
  end
endmodule
