// nima_dmem: dual-port data memory of the NIMA data-path.
//
// DEPTH words of XLEN bits, NP independent ports. Each port takes a word
// address, write data and a write enable in one cycle; a write lands at that
// clock edge and a read returns the word one cycle later on rdata (read
// before write when a port reads and writes the same word). If two ports
// write the same word in one cycle the higher-numbered port wins. The
// memory is not reset. The document uses a dual-port data memory in its
// benchmark data-path and shows it with registered inputs; its depth and the
// one-cycle read latency are this design's choices.
module nima_dmem #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NP    = 2,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic [NP-1:0]            we,
  input  logic [NP-1:0][AW-1:0]    addr,
  input  logic [NP-1:0][XLEN-1:0]  wdata,
  output logic [NP-1:0][XLEN-1:0]  rdata
);
  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(NP); p++) begin
      rdata[p] <= mem[addr[p]];
      if (we[p]) mem[addr[p]] <= wdata[p];
    end
  end
endmodule
