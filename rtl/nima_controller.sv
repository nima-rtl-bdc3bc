// nima_controller: next-address logic of the NIMA processor, with the program
// counter (PC), link register (LR) and status register.
//
// The PC is the address being fetched from the control memory; cw_pc is the
// address of the control word now executing (one cycle behind). The
// executing word's op field chooses the next fetch address:
//   CTL_NEXT  pc + 1
//   CTL_JMP   cw_pc + offset                     (offset is signed)
//   CTL_BRT   cw_pc + offset if status = 1, else pc + 1
//   CTL_BRF   cw_pc + offset if status = 0, else pc + 1
//   CTL_CALL  cw_pc + offset, and LR <= cw_pc + 2
//   CTL_JIND  jaddr, the absolute address from Controller_addrM
//   CTL_HALT  nothing advances; halted is high and the CW register holds
// Because the word after a transfer is already being fetched when the
// transfer executes, it always executes (one delay slot), as in a statically
// scheduled NISC pipeline; a call returns past its delay slot. The status
// register loads bit 0 of the comparator result when status_ld is high and is
// read by the following words. PC, LR and status clear on reset.
// The document names PC, LR, status, offset and address inputs of the
// controller; the operation set, the relative offsets and the delay slot are
// this design's choices.
module nima_controller
  import nima_pkg::*;
#(
  parameter int unsigned PCW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  ctl_op_e        op,
  input  logic [PCW-1:0] offset,
  input  logic [PCW-1:0] jaddr,
  input  logic           status_ld,
  input  logic           status_in,
  output logic [PCW-1:0] pc,
  output logic [PCW-1:0] cw_pc,
  output logic [PCW-1:0] lr,
  output logic           status,
  output logic           hold,
  output logic           halted
);
  logic [PCW-1:0] next_pc, target;

  always_comb begin
    target  = cw_pc + offset;
    next_pc = pc + PCW'(1);
    unique case (op)
      CTL_JMP, CTL_CALL: next_pc = target;
      CTL_BRT:  if (status)  next_pc = target;
      CTL_BRF:  if (!status) next_pc = target;
      CTL_JIND: next_pc = jaddr;
      CTL_HALT: next_pc = pc;
      default:  next_pc = pc + PCW'(1);
    endcase
  end

  assign halted = (op == CTL_HALT);
  assign hold   = halted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      cw_pc  <= '0;
      lr     <= '0;
      status <= 1'b0;
    end else begin
      if (!halted) begin
        pc    <= next_pc;
        cw_pc <= pc;
      end
      if (op == CTL_CALL) lr <= cw_pc + PCW'(2);
      if (status_ld)      status <= status_in;
    end
  end
endmodule
