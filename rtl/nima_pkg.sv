// nima_pkg: types and constants shared by the NIMA processor blocks.
//
// The NIMA processor has no instruction set: every cycle a wide control word
// (CW) read from the control memory drives each multiplexer, functional unit
// (FU), register-file port and the next-address logic directly. This package
// holds the small encodings used inside that control word: the next-address
// operation of the controller, the ALU and comparator operation codes, the FU
// kinds a data-path slot can hold, and the fixed operand-source codes of the
// FU input multiplexers. All encodings are this design's own choice; the
// document names the units but does not give their encodings.
package nima_pkg;

  // Next-address operation of the controller. CTL_NEXT must be 0 so that an
  // all-zero control word is a no-operation.
  typedef enum logic [2:0] {
    CTL_NEXT = 3'd0,  // fall through to the next control word
    CTL_JMP  = 3'd1,  // jump to executing address + offset
    CTL_BRT  = 3'd2,  // branch (address + offset) when status is 1
    CTL_BRF  = 3'd3,  // branch (address + offset) when status is 0
    CTL_CALL = 3'd4,  // link register <= return address, jump to address + offset
    CTL_JIND = 3'd5,  // jump to the absolute address chosen by Controller_addrM
    CTL_HALT = 3'd6   // stop: hold the current control word
  } ctl_op_e;

  // ALU (bitwise and shift unit) operations.
  typedef enum logic [2:0] {
    ALU_AND = 3'd0,
    ALU_OR  = 3'd1,
    ALU_XOR = 3'd2,
    ALU_NOR = 3'd3,
    ALU_SLL = 3'd4,
    ALU_SRL = 3'd5,
    ALU_SRA = 3'd6,
    ALU_PASS = 3'd7   // pass operand a
  } alu_op_e;

  // Comparator operations; the result is 1 or 0 in bit 0.
  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NE  = 3'd1,
    CMP_LT  = 3'd2,   // signed a < b
    CMP_GE  = 3'd3,   // signed a >= b
    CMP_LTU = 3'd4,   // unsigned a < b
    CMP_GEU = 3'd5,   // unsigned a >= b
    CMP_LE  = 3'd6,   // signed a <= b
    CMP_GT  = 3'd7    // signed a > b
  } cmp_op_e;

  // What a data-path slot holds.
  typedef enum logic [2:0] {
    FU_ADD = 3'd0,
    FU_SUB = 3'd1,
    FU_MUL = 3'd2,
    FU_CMP = 3'd3,
    FU_ALU = 3'd4
  } fu_kind_e;

  // Width of the per-FU operation field in the control word.
  localparam int unsigned FU_OP_W = 3;

  // Fixed source codes of every operand multiplexer; codes from SRC_OM0 on
  // select forwarded output buses OM0, OM1, ... .
  localparam int unsigned SRC_RF   = 0;  // the RF read port assigned to this operand
  localparam int unsigned SRC_CONST = 1; // the constant field of the control word
  localparam int unsigned SRC_OM0  = 2;  // first forwarded output bus

  // Bits needed to code n values (at least 1).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // Width of the control word for a given data-path configuration; must
  // match the cw_t layout in nima_cw.svh.
  function automatic int unsigned cw_width(
      input int unsigned xlen, input int unsigned n_fu, input int unsigned n_memp,
      input int unsigned rf_rp, input int unsigned rf_wp, input int unsigned rf_depth,
      input bit fwd, input int unsigned cmem_depth);
    int unsigned nsrc, gsz;
    nsrc = fwd ? (SRC_OM0 + rf_wp) : SRC_OM0;
    gsz  = (n_fu + n_memp + rf_wp - 1) / rf_wp;
    return xlen                                  // cnst
         + idx_w(cmem_depth)                     // offset
         + 3 + 1                                 // ctl, status_ld
         + $clog2(rf_wp + 1)                     // addrm_sel
         + (2 * n_fu + 2 * n_memp) * idx_w(nsrc) // opnd_sel
         + n_fu * FU_OP_W                        // fu_op
         + rf_rp * idx_w(rf_depth)               // rd_addr
         + rf_wp * (1 + idx_w(rf_depth) + idx_w(gsz)) // wr_en, wr_addr, om_sel
         + n_memp;                               // mem_we
  endfunction

endpackage
