// tb_nima_controller: self-checking testbench for nima_controller.
//
// Drives random next-address operations, offsets, jump addresses and status
// loads, and compares PC, the executing address, LR, status and halted with a
// cycle-by-cycle reference model written from the operation table.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_controller;
  import nima_pkg::*;
  localparam int unsigned PCW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  ctl_op_e        op;
  logic [PCW-1:0] offset, jaddr, pc, cw_pc, lr;
  logic           status_ld, status_in, status, hold, halted;
  logic [PCW-1:0] m_pc, m_cw_pc, m_lr;
  logic           m_status;
  int             n_taken = 0, n_halt = 0;

  nima_controller #(.PCW(PCW)) dut (.clk, .rst_n, .op, .offset, .jaddr, .status_ld,
    .status_in, .pc, .cw_pc, .lr, .status, .hold, .halted);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %0h expected %0h (op %s)", what, got, exp, op.name());
    end
  endtask

  initial begin
    logic [PCW-1:0] nxt;
    op = CTL_NEXT; offset = '0; jaddr = '0; status_ld = 1'b0; status_in = 1'b0;
    m_pc = '0; m_cw_pc = '0; m_lr = '0; m_status = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      op        = ctl_op_e'($urandom_range(0, 6));
      if (op == CTL_HALT && $urandom_range(0, 3) != 0) op = CTL_NEXT;
      offset    = PCW'($urandom);
      jaddr     = PCW'($urandom);
      status_ld = $urandom_range(0, 1);
      status_in = $urandom_range(0, 1);
      #1;
      chk(32'(halted), 32'(op == CTL_HALT), "halted");
      chk(32'(hold), 32'(op == CTL_HALT), "hold");
      // reference next address
      nxt = m_pc + 1'b1;
      case (op)
        CTL_JMP, CTL_CALL: nxt = m_cw_pc + offset;
        CTL_BRT:  if (m_status)  nxt = m_cw_pc + offset;
        CTL_BRF:  if (!m_status) nxt = m_cw_pc + offset;
        CTL_JIND: nxt = jaddr;
        CTL_HALT: nxt = m_pc;
        default: ;
      endcase
      if (nxt != m_pc + 1'b1) n_taken++;
      if (op == CTL_HALT) n_halt++;
      @(posedge clk);
      if (op == CTL_CALL) m_lr = m_cw_pc + 2'd2;
      if (status_ld) m_status = status_in;
      if (op != CTL_HALT) begin
        m_cw_pc = m_pc;
        m_pc    = nxt;
      end
      #1;
      chk(32'(pc), 32'(m_pc), "pc");
      chk(32'(cw_pc), 32'(m_cw_pc), "cw_pc");
      chk(32'(lr), 32'(m_lr), "lr");
      chk(32'(status), 32'(m_status), "status");
    end
    checks++;
    if (n_taken == 0 || n_halt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
