// nima_top: the NIMA processor, a No-Instruction-Set Computer whose data-path
// is sized from how often a fog-computing benchmark uses each kind of unit.
//
// Control: the controller's PC addresses the control memory (CMem); each
// cycle the addressed control word is copied into the CW register and drives
// the whole machine for one cycle. There is no instruction decoder.
// Data-path: N_ADD adders, N_MUL multipliers, N_SUB subtractors, N_CMP
// comparators and N_ALU logic/shift units, each behind two small operand
// multiplexers (RF read port, the CW constant, or a forwarded output bus),
// with input pipeline registers (IREG) and/or output registers (OREG). A
// dual-port data memory sits beside them. All result producers are dealt
// round robin into RF_WP groups; each group's output multiplexer (OM) drives
// one bus, which feeds one register-file write port and, when FWD = 1, every
// operand multiplexer (forwarding). Operand k reads RF read port k mod RF_RP.
// Comparator 0 loads the controller's status register for branches, and
// Controller_addrM supplies return and computed jump addresses.
//
// Timing (IREG + OREG = 1, both proposed configurations): the control word
// of cycle t selects operands and FU operations; the results are on the
// output buses in cycle t+1, where that cycle's control word picks them with
// om_sel and writes them with wr_en / wr_addr, or forwards them. A memory
// read issued in cycle t is likewise on its bus in cycle t+1, and status_ld
// in cycle t+1 captures comparator 0's result for a branch in t+2. One delay
// slot follows every control transfer (see nima_controller).
//
// Defaults are the document's performance-objective processor: 4 adders,
// 2 multipliers, 2 subtractors, 1 comparator, an 8x4 register file (4 input
// ports), input pipeline registers on all 20 FU operands and forwarding.
// The power-objective processor is RF_RP = 4, RF_WP = 2, IREG = 0, OREG = 1.
// Word width, memory depths, register 0 = zero, the ALU, the control-word
// layout (nima_cw.svh) and the two load/host ports are this design's own
// choices. The load port writes CMem; the host port takes over data-memory
// port 0 while host_en is high (hold the processor in reset or halted).
module nima_top
  import nima_pkg::*;
#(
  parameter int unsigned XLEN       = 32,
  parameter int unsigned N_ADD      = 4,
  parameter int unsigned N_MUL      = 2,
  parameter int unsigned N_SUB      = 2,
  parameter int unsigned N_CMP      = 1,
  parameter int unsigned N_ALU      = 1,
  parameter int unsigned N_MEMP     = 2,
  parameter int unsigned RF_RP      = 8,
  parameter int unsigned RF_WP      = 4,
  parameter int unsigned RF_DEPTH   = 32,
  parameter bit          IREG       = 1'b1,
  parameter bit          OREG       = 1'b0,
  parameter bit          FWD        = 1'b1,
  parameter int unsigned CMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 1024,
  localparam int unsigned CW_W    = cw_width(XLEN, N_ADD + N_MUL + N_SUB + N_CMP + N_ALU,
                                             N_MEMP, RF_RP, RF_WP, RF_DEPTH, FWD, CMEM_DEPTH),
  localparam int unsigned CMEM_AW = idx_w(CMEM_DEPTH),
  localparam int unsigned DMEM_AW = idx_w(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control-memory load port
  input  logic               cmem_we,
  input  logic [CMEM_AW-1:0] cmem_waddr,
  input  logic [CW_W-1:0]    cmem_wdata,
  // host access to data-memory port 0
  input  logic               host_en,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  logic [XLEN-1:0]    host_wdata,
  output logic [XLEN-1:0]    host_rdata,
  // status
  output logic               halted,
  output logic [CMEM_AW-1:0] pc,
  output logic               status
);
  `include "nima_cw.svh"

  if (FWD && !IREG && !OREG) begin : g_cfg_err
    $error("nima_top: forwarding needs an input or output pipeline register");
  end
  if (N_CMP < 1) begin : g_cmp_err
    $error("nima_top: at least one comparator is needed for the status register");
  end

  cw_t                        cw;
  logic [CW_W-1:0]            cw_bits;
  logic                       hold;
  logic [PCW-1:0]             lr, jaddr;
  logic [RF_RP-1:0][XLEN-1:0] rf_rdata;
  logic [N_OM-1:0][XLEN-1:0]  om;
  logic [N_PROD-1:0][XLEN-1:0] prod;
  logic [N_OPND-1:0][XLEN-1:0] opnd_rf;

  assign cw = cw_t'(cw_bits);

  // ---------------- control ----------------
  nima_cmem #(.CW_W(CW_W), .DEPTH(CMEM_DEPTH)) u_cmem (
    .clk, .rst_n,
    .we(cmem_we), .waddr(cmem_waddr), .wdata(cmem_wdata),
    .raddr(pc), .hold(hold), .cw(cw_bits));

  nima_addrm #(.PCW(PCW), .XLEN(XLEN), .N_OM(N_OM)) u_addrm (
    .sel(cw.addrm_sel), .lr(lr), .om(om), .addr(jaddr));

  nima_controller #(.PCW(PCW)) u_ctrl (
    .clk, .rst_n,
    .op(cw.ctl), .offset(cw.offset), .jaddr(jaddr),
    .status_ld(cw.status_ld), .status_in(prod[FU_CMP0][0]),
    .pc(pc), .cw_pc(), .lr(lr), .status(status),
    .hold(hold), .halted(halted));

  // ---------------- register file ----------------
  nima_regfile #(.XLEN(XLEN), .DEPTH(RF_DEPTH), .NRP(RF_RP), .NWP(RF_WP)) u_rf (
    .clk, .rst_n,
    .raddr(cw.rd_addr), .rdata(rf_rdata),
    .we(cw.wr_en), .waddr(cw.wr_addr), .wdata(om));

  // round-robin assignment of RF read ports to operands
  always_comb begin
    for (int k = 0; k < int'(N_OPND); k++)
      opnd_rf[k] = rf_rdata[k % int'(RF_RP)];
  end

  // ---------------- functional units ----------------
  for (genvar i = 0; i < N_FU; i++) begin : g_fu
    localparam fu_kind_e KIND = (i < FU_MUL0) ? FU_ADD :
                                (i < FU_SUB0) ? FU_MUL :
                                (i < FU_CMP0) ? FU_SUB :
                                (i < FU_ALU0) ? FU_CMP : FU_ALU;
    nima_fu_slot #(.KIND(KIND), .XLEN(XLEN), .N_OM(N_OM), .FWD(FWD),
                   .IREG(IREG), .OREG(OREG)) u_slot (
      .clk, .rst_n,
      .sel_a(cw.opnd_sel[2*i]), .sel_b(cw.opnd_sel[2*i+1]), .op(cw.fu_op[i]),
      .rf_a(opnd_rf[2*i]), .rf_b(opnd_rf[2*i+1]),
      .cnst(cw.cnst), .om(om), .y(prod[i]));
  end

  // ---------------- data memory ----------------
  logic [N_MEMP-1:0][XLEN-1:0]    m_addr_full, m_wdata_dp;
  logic [N_MEMP-1:0]              m_we;
  logic [N_MEMP-1:0][DMEM_AW-1:0] m_addr;
  logic [N_MEMP-1:0][XLEN-1:0]    m_wdata, m_rdata;

  for (genvar m = 0; m < N_MEMP; m++) begin : g_mport
    localparam int unsigned KA = 2 * N_FU + 2 * m;
    nima_operand_mux #(.XLEN(XLEN), .N_OM(N_OM), .FWD(FWD)) u_amux (
      .sel(cw.opnd_sel[KA]), .rf(opnd_rf[KA]), .cnst(cw.cnst), .om(om),
      .y(m_addr_full[m]));
    nima_operand_mux #(.XLEN(XLEN), .N_OM(N_OM), .FWD(FWD)) u_dmux (
      .sel(cw.opnd_sel[KA+1]), .rf(opnd_rf[KA+1]), .cnst(cw.cnst), .om(om),
      .y(m_wdata_dp[m]));
    if (m == 0) begin : g_host
      always_comb begin
        m_we[m]    = host_en ? host_we    : cw.mem_we[m];
        m_addr[m]  = host_en ? host_addr  : m_addr_full[m][DMEM_AW-1:0];
        m_wdata[m] = host_en ? host_wdata : m_wdata_dp[m];
      end
    end else begin : g_dp
      always_comb begin
        m_we[m]    = cw.mem_we[m];
        m_addr[m]  = m_addr_full[m][DMEM_AW-1:0];
        m_wdata[m] = m_wdata_dp[m];
      end
    end
    assign prod[N_FU + m] = m_rdata[m];
  end

  nima_dmem #(.XLEN(XLEN), .DEPTH(DMEM_DEPTH), .NP(N_MEMP)) u_dmem (
    .clk, .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  assign host_rdata = m_rdata[0];

  // ---------------- output groups (OM buses) ----------------
  for (genvar g = 0; g < N_OM; g++) begin : g_grp
    logic [GSZ-1:0][XLEN-1:0] members;
    for (genvar j = 0; j < GSZ; j++) begin : g_mem
      if (g + j * N_OM < N_PROD) begin : g_on
        assign members[j] = prod[g + j * N_OM];
      end else begin : g_off
        assign members[j] = '0;
      end
    end
    nima_output_mux #(.XLEN(XLEN), .N_IN(GSZ)) u_om (
      .sel(cw.om_sel[g]), .d(members), .y(om[g]));
  end

  // The control word's width must match its layout.
  if ($bits(cw_t) != CW_W) begin : g_w_err
    $error("nima_top: control word layout and width disagree");
  end
endmodule
