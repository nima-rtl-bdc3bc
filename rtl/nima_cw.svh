// nima_cw.svh: layout of the NIMA control word.
//
// Included inside a module that has imported nima_pkg and that defines the
// configuration names XLEN, N_ADD, N_MUL, N_SUB, N_CMP, N_ALU, N_MEMP, RF_RP,
// RF_WP, RF_DEPTH, FWD and CMEM_DEPTH (the processor top, or a testbench that
// assembles control words for it). It derives the data-path's sizes and
// declares cw_t, the control word as a packed struct. The numbering the
// fields use:
//   FU i        adders first, then multipliers, subtractors, comparators, ALUs
//   operand k   FU i's operand a is k = 2i, operand b is k = 2i+1; memory
//               port m's address is k = 2*N_FU + 2m, its write data k + 1
//   RF port     operand k reads through RF read port k mod RF_RP
//   producer p  FU i is p = i, memory port m's read data is p = N_FU + m
//   group g     producer p belongs to group p mod RF_WP, position p / RF_WP;
//               om_sel[g] picks the position, and group g drives output bus
//               OMg and RF write port g

localparam int unsigned N_FU   = N_ADD + N_MUL + N_SUB + N_CMP + N_ALU;
localparam int unsigned N_PROD = N_FU + N_MEMP;
localparam int unsigned N_OM   = RF_WP;
localparam int unsigned GSZ    = (N_PROD + RF_WP - 1) / RF_WP;
localparam int unsigned GSW    = idx_w(GSZ);
localparam int unsigned NSRC   = FWD ? (SRC_OM0 + N_OM) : SRC_OM0;
localparam int unsigned SW     = idx_w(NSRC);
localparam int unsigned N_OPND = 2 * N_FU + 2 * N_MEMP;
localparam int unsigned RAW    = idx_w(RF_DEPTH);
localparam int unsigned PCW    = idx_w(CMEM_DEPTH);
localparam int unsigned AMW    = $clog2(N_OM + 1);
localparam int unsigned FU_MUL0 = N_ADD;                  // index of the first multiplier
localparam int unsigned FU_SUB0 = N_ADD + N_MUL;          // first subtractor
localparam int unsigned FU_CMP0 = N_ADD + N_MUL + N_SUB;  // first comparator
localparam int unsigned FU_ALU0 = FU_CMP0 + N_CMP;        // first ALU

typedef struct packed {
  logic [XLEN-1:0]              cnst;       // constant operand
  logic [PCW-1:0]               offset;     // signed control-transfer offset
  ctl_op_e                      ctl;        // next-address operation
  logic                         status_ld;  // load status from comparator 0
  logic [AMW-1:0]               addrm_sel;  // Controller_addrM source
  logic [N_OPND-1:0][SW-1:0]    opnd_sel;   // operand multiplexer selects
  logic [N_FU-1:0][FU_OP_W-1:0] fu_op;      // ALU / comparator operation
  logic [RF_RP-1:0][RAW-1:0]    rd_addr;    // RF read addresses
  logic [RF_WP-1:0]             wr_en;      // RF write enables
  logic [RF_WP-1:0][RAW-1:0]    wr_addr;    // RF write addresses
  logic [RF_WP-1:0][GSW-1:0]    om_sel;     // group output multiplexer selects
  logic [N_MEMP-1:0]            mem_we;     // data-memory write enables
} cw_t;
