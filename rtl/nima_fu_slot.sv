// nima_fu_slot: one functional unit of the NIMA data-path with its operand
// multiplexers and optional pipeline registers.
//
// Operands a and b each pass through a nima_operand_mux (RF read port,
// constant, or a forwarded output bus). With IREG = 1 the two chosen operands
// and the operation code are captured in input registers at the clock edge
// and the FU computes from them in the next cycle; with OREG = 1 the FU
// result is captured in an output register. The FU kind (adder, subtractor,
// multiplier, comparator, ALU) is fixed by KIND. Latency from operand
// selection to y: IREG + OREG cycles (0, 1 or 2). In both pipelined
// configurations the document proposes (input registers for the performance
// objective, output registers for the power objective) the latency is one
// cycle, so the same schedule runs on either.
//
// The document states where pipeline registers go (input or output side) and
// how many; capturing the operation code together with the operands, and
// loading the registers every cycle with no enable, is this design's choice.
module nima_fu_slot
  import nima_pkg::*;
#(
  parameter fu_kind_e    KIND = FU_ADD,
  parameter int unsigned XLEN = 32,
  parameter int unsigned N_OM = 4,
  parameter bit          FWD  = 1'b1,
  parameter bit          IREG = 1'b1,
  parameter bit          OREG = 1'b0,
  localparam int unsigned NSRC = FWD ? (SRC_OM0 + N_OM) : SRC_OM0,
  localparam int unsigned SW   = idx_w(NSRC)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [SW-1:0]             sel_a,
  input  logic [SW-1:0]             sel_b,
  input  logic [FU_OP_W-1:0]        op,
  input  logic [XLEN-1:0]           rf_a,
  input  logic [XLEN-1:0]           rf_b,
  input  logic [XLEN-1:0]           cnst,
  input  logic [N_OM-1:0][XLEN-1:0] om,
  output logic [XLEN-1:0]           y
);
  logic [XLEN-1:0]    mux_a, mux_b;     // multiplexer outputs
  logic [XLEN-1:0]    opa, opb;         // operands seen by the FU
  logic [FU_OP_W-1:0] fu_op;
  logic [XLEN-1:0]    res;

  nima_operand_mux #(.XLEN(XLEN), .N_OM(N_OM), .FWD(FWD)) u_mux_a (
    .sel(sel_a), .rf(rf_a), .cnst(cnst), .om(om), .y(mux_a));
  nima_operand_mux #(.XLEN(XLEN), .N_OM(N_OM), .FWD(FWD)) u_mux_b (
    .sel(sel_b), .rf(rf_b), .cnst(cnst), .om(om), .y(mux_b));

  if (IREG) begin : g_ireg
    logic [XLEN-1:0]    ra, rb;
    logic [FU_OP_W-1:0] rop;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ra  <= '0;
        rb  <= '0;
        rop <= '0;
      end else begin
        ra  <= mux_a;
        rb  <= mux_b;
        rop <= op;
      end
    end
    assign opa   = ra;
    assign opb   = rb;
    assign fu_op = rop;
  end else begin : g_noireg
    assign opa   = mux_a;
    assign opb   = mux_b;
    assign fu_op = op;
  end

  if (KIND == FU_ADD) begin : g_add
    nima_adder #(.XLEN(XLEN)) u_fu (.a(opa), .b(opb), .y(res));
  end else if (KIND == FU_SUB) begin : g_sub
    nima_sub #(.XLEN(XLEN)) u_fu (.a(opa), .b(opb), .y(res));
  end else if (KIND == FU_MUL) begin : g_mul
    nima_mul #(.XLEN(XLEN)) u_fu (.a(opa), .b(opb), .y(res));
  end else if (KIND == FU_CMP) begin : g_cmp
    nima_comp #(.XLEN(XLEN)) u_fu (.a(opa), .b(opb), .op(cmp_op_e'(fu_op)), .y(res));
  end else begin : g_alu
    nima_alu #(.XLEN(XLEN)) u_fu (.a(opa), .b(opb), .op(alu_op_e'(fu_op)), .y(res));
  end

  if (OREG) begin : g_oreg
    logic [XLEN-1:0] ry;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ry <= '0;
      else        ry <= res;
    end
    assign y = ry;
  end else begin : g_nooreg
    assign y = res;
  end
endmodule
