// tb_nima_top: end-to-end testbench for the NIMA processor at its default
// (performance-objective) configuration.
//
// The testbench assembles control words itself, with the layout of
// nima_cw.svh and small helper tasks that route an operand through its RF
// read port, the constant or a forwarded bus and that catch two uses of one
// port, one group bus or the constant in the same word.
//
// Program 1 is a 4-tap FIR filter, y[n] = h0 x[n] + h1 x[n-1] + h2 x[n-2] +
// h3 x[n-3], one of the benchmark's kernels, hand-scheduled at five control
// words per sample: both multipliers, three adders, the comparator, both
// memory ports, four RF writes in one cycle, forwarding and a branch with its
// delay slot. Program 2 calls a subroutine (subtractor and ALU), returns
// through the link register, and takes a computed jump over a trap store.
// Inputs go in and results come out through the host port. Results are
// compared with a model computed in the testbench, the cycle count of the FIR
// with 5 N + 9, and each mechanism is counted; one that never happens is a
// failure. A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_top;
  import nima_pkg::*;
  // the processor's default configuration
  localparam int unsigned XLEN = 32, N_ADD = 4, N_MUL = 2, N_SUB = 2, N_CMP = 1, N_ALU = 1;
  localparam int unsigned N_MEMP = 2, RF_RP = 8, RF_WP = 4, RF_DEPTH = 32;
  localparam bit          FWD = 1'b1;
  localparam int unsigned CMEM_DEPTH = 256, DMEM_DEPTH = 1024;
  `include "nima_cw.svh"
  localparam int unsigned CW_W = $bits(cw_t);

  localparam int unsigned NS   = 64;    // FIR samples
  localparam int unsigned X0   = 0;     // x[] base address
  localparam int unsigned Y0   = 512;   // y[] base address
  localparam int unsigned PROG = 32;    // control words assembled per program

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              cmem_we;
  logic [PCW-1:0]    cmem_waddr;
  logic [CW_W-1:0]   cmem_wdata;
  logic              host_en, host_we;
  logic [9:0]        host_addr;
  logic [XLEN-1:0]   host_wdata, host_rdata;
  logic              halted, status;
  logic [PCW-1:0]    pc;

  nima_top dut (.clk, .rst_n, .cmem_we, .cmem_waddr, .cmem_wdata, .host_en, .host_we,
    .host_addr, .host_wdata, .host_rdata, .halted, .pc, .status);

  `include "nima_tb_asm.svh"

  // ---------------- program 1: FIR ----------------
  int unsigned h [4];
  int          fir_end;

  task automatic build_fir();
    int unsigned regs [6];
    int unsigned vals [6];
    int c, A;
    clear_prog();
    regs = '{11, 13, 1, 2, 3, 4};
    vals = '{NS, Y0 - 1, h[0], h[1], h[2], h[3]};
    // prologue: r11 = N, r13 = Y0 - 1, r1..r4 = taps (adder 0, then write back)
    for (c = 0; c < 6; c++) begin
      fu(c, 0, RF(0), K(vals[c]));
      if (c > 0) wb(c, P_ADD0, regs[c-1]);
    end
    wb(6, P_ADD0, regs[5]);
    fu(6, 3, RF(8), K(0));                    // as in word E: adder 3 moves r8 (x[-1] = 0)
    A = 7;
    // A: load x[n]; store previous y; r12++, r13++; mul1 = h1 * x[n-1] (forwarded)
    wb(A, P_ADD3, 5);
    bus(A, P_ADD1);
    mem_wr(A, 1, RF(13), OM(P_ADD1 % N_OM));
    mem_rd(A, 0, RF(12));
    fu(A, 0, RF(12), K(1));
    fu(A, 3, RF(13), K(1));
    fu(A, I_MUL1, RF(2), OM(P_ADD3 % N_OM));
    // B
    wb(A+1, P_ADD0, 12);
    wb(A+1, P_MUL1, 20);
    wb(A+1, P_MEM0, 8);
    wb(A+1, P_ADD3, 13);
    fu(A+1, I_MUL0, RF(1), OM(P_MEM0 % N_OM));
    fu(A+1, I_MUL1, RF(3), RF(6));
    fu(A+1, I_CMP0, OM(P_ADD0 % N_OM), RF(11), CMP_LT);
    // C
    wb(A+2, P_MUL0, 21);
    wb(A+2, P_MUL1, 22);
    prog[A+2].status_ld = 1'b1;
    fu(A+2, I_MUL0, RF(4), RF(7));
    fu(A+2, 1, RF(20), OM(P_MUL0 % N_OM));
    fu(A+2, 3, RF(6), K(0));
    // D
    wb(A+3, P_ADD1, 24);
    wb(A+3, P_ADD3, 7);
    bus(A+3, P_MUL0);
    fu(A+3, 0, OM(P_MUL0 % N_OM), RF(22));
    fu(A+3, 2, RF(5), K(0));
    ctl(A+3, CTL_BRT, -3);
    // E (delay slot)
    wb(A+4, P_ADD2, 6);
    bus(A+4, P_ADD0);
    fu(A+4, 1, RF(24), OM(P_ADD0 % N_OM));
    fu(A+4, 3, RF(8), K(0));
    // F: store the last y, G: halt
    bus(A+5, P_ADD1);
    mem_wr(A+5, 1, RF(13), OM(P_ADD1 % N_OM));
    ctl(A+6, CTL_HALT);
    fir_end = A + 6;
  endtask

  // ---------------- program 2: call, return, computed jump ----------------
  localparam int unsigned SUB_AT = 10, JMP_AT = 20;
  task automatic build_calls();
    clear_prog();
    fu(0, 0, RF(0), K(100));                  // r1 = 100
    wb(1, P_ADD0, 1);
    ctl(1, CTL_CALL, SUB_AT - 1);             // call; word 2 is the delay slot
    mem_wr(3, 0, K(200), RF(3));              // return lands here: mem[200] = r3
    mem_wr(4, 1, K(203), RF(4));              // mem[203] = r4
    fu(5, 0, RF(0), K(JMP_AT));               // target address computed by adder 0
    bus(6, P_ADD0);
    ctl(6, CTL_JIND, 0, 1 + P_ADD0 % N_OM);   // jump to OM0
    mem_wr(8, 0, K(201), RF(1));              // must be skipped
    // subroutine: r3 = r1 - 58, r4 = r1 << (r1 & 31)
    fu(SUB_AT, I_SUB0, RF(1), K(58));
    fu(SUB_AT, I_ALU0, RF(1), RF(1), ALU_SLL);
    wb(SUB_AT + 1, P_SUB0, 3);
    wb(SUB_AT + 1, P_ALU0, 4);
    ctl(SUB_AT + 1, CTL_JIND, 0, 0);          // return through LR
    mem_wr(JMP_AT, 0, K(202), RF(3));         // mem[202] = r3
    ctl(JMP_AT + 1, CTL_HALT);
  endtask

  initial begin
    logic [XLEN-1:0] x [NS];
    logic [XLEN-1:0] d, yexp;
    int cycles;
    cmem_we = 1'b0; cmem_waddr = '0; cmem_wdata = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;

    // ---- program 1: FIR ----
    for (int t = 0; t < 4; t++) h[t] = $urandom_range(0, 2000) - 1000;
    for (int n = 0; n < int'(NS); n++) begin
      x[n] = $urandom_range(0, 60000) - 30000;
      host_write(X0 + n, x[n]);
    end
    build_fir();
    load_prog();
    run(cycles);
    $display("FIR: %0d samples in %0d cycles", NS, cycles);
    chk(cycles, 5 * NS + 9, "FIR cycle count");
    for (int n = 0; n < int'(NS); n++) begin
      yexp = '0;
      for (int t = 0; t < 4; t++) if (n - t >= 0) yexp += h[t] * x[n-t];
      host_read(Y0 + n, d);
      chk(d, yexp, $sformatf("y[%0d]", n));
    end
    chk(32'(pc), 32'(fir_end + 1), "halt address");

    // ---- program 2: call / return / computed jump ----
    @(negedge clk) rst_n = 1'b0;
    host_write(201, 0);
    build_calls();
    load_prog();
    run(cycles);
    host_read(200, d); chk(d, 32'd42, "subroutine sub result");
    host_read(203, d); chk(d, 32'd100 << 4, "subroutine alu result");
    host_read(201, d); chk(d, 32'd0, "skipped store");
    host_read(202, d); chk(d, 32'd42, "jump target store");

    // ---- every mechanism must have happened ----
    $display("forwarded operands %0d, branches taken %0d / fallen through %0d, calls %0d, returns %0d",
             n_fwd, n_br_taken, n_br_fall, n_call, n_ret);
    $display("computed jumps %0d, delay slots %0d, halted cycles %0d, dual-port memory cycles %0d",
             n_jind_bus, n_delay, n_halt, n_dual_mem);
    $display("4-write RF cycles %0d, status loads %0d", n_rf4, n_status);
    chk(32'(n_fwd > 0), 1, "forwarding happened");
    chk(32'(n_br_taken == int'(NS) - 1), 1, "loop branch taken N-1 times");
    chk(32'(n_br_fall == 1), 1, "loop exit happened once");
    chk(32'(n_call > 0 && n_ret > 0), 1, "call and return happened");
    chk(32'(n_jind_bus > 0), 1, "computed jump happened");
    chk(32'(n_delay > 0), 1, "delay slot happened");
    chk(32'(n_halt > 0), 1, "halt happened");
    chk(32'(n_dual_mem > 0), 1, "both memory ports in one cycle");
    chk(32'(n_rf4 > 0), 1, "four RF writes in one cycle");
    chk(32'(n_status > 0), 1, "status load happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
