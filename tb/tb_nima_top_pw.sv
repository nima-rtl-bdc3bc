// tb_nima_top_pw: end-to-end testbench for the NIMA processor in its
// power-objective configuration: a 4x2 register file (two input ports, so two
// output groups), output registers instead of input registers, forwarding on.
//
// Runs the 4-tap FIR filter y[n] = h0 x[n] + h1 x[n-1] + h2 x[n-2] + h3 x[n-3]
// re-scheduled for two write ports and four read ports: seven control words
// per sample, with most partial results passed from FU to FU over the
// forwarding buses instead of through the register file. Checks every output
// against a model computed in the testbench, the cycle count (7 N + 8) and
// that forwarding, the loop branch, its exit and the delay slot all happened.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_top_pw;
  import nima_pkg::*;
  // the power-objective configuration
  localparam int unsigned XLEN = 32, N_ADD = 4, N_MUL = 2, N_SUB = 2, N_CMP = 1, N_ALU = 1;
  localparam int unsigned N_MEMP = 2, RF_RP = 4, RF_WP = 2, RF_DEPTH = 32;
  localparam bit          FWD = 1'b1;
  localparam int unsigned CMEM_DEPTH = 256, DMEM_DEPTH = 1024;
  `include "nima_cw.svh"
  localparam int unsigned CW_W = $bits(cw_t);

  localparam int unsigned NS   = 64;
  localparam int unsigned X0   = 0;
  localparam int unsigned Y0   = 512;
  localparam int unsigned PROG = 32;

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

  nima_top #(.RF_RP(RF_RP), .RF_WP(RF_WP), .IREG(1'b0), .OREG(1'b1)) dut (
    .clk, .rst_n, .cmem_we, .cmem_waddr, .cmem_wdata, .host_en, .host_we,
    .host_addr, .host_wdata, .host_rdata, .halted, .pc, .status);

  `include "nima_tb_asm.svh"

  int unsigned h [4];
  int          fir_end;

  task automatic build_fir();
    int unsigned regs [6];
    int unsigned vals [6];
    int c, A;
    clear_prog();
    regs = '{11, 13, 1, 2, 3, 4};
    vals = '{NS, Y0, h[0], h[1], h[2], h[3]};
    for (c = 0; c < 6; c++) begin
      fu(c, 0, RF(0), K(vals[c]));
      if (c > 0) wb(c, P_ADD0, regs[c-1]);
    end
    wb(6, P_ADD0, regs[5]);
    fu(6, FU_SUB0 + 1, RF(8), RF(0));          // as in word G: r5 <= r8 (x[-1] = 0)
    A = 7;
    // A: load x[n], n + 1
    wb(A, FU_SUB0 + 1, 5);
    mem_rd(A, 0, RF(12));
    fu(A, 1, RF(12), K(1));
    // B: r8 = x[n], r12 = n + 1; h0 * x[n], h1 * x[n-1]; compare n + 1 < N
    wb(A+1, P_MEM0, 8);
    wb(A+1, P_ADD1, 12);
    fu(A+1, I_MUL0, RF(1), OM(P_MEM0 % N_OM));
    fu(A+1, I_MUL1, RF(2), RF(5));
    fu(A+1, I_CMP0, OM(P_ADD1 % N_OM), RF(11), CMP_LT);
    // C: s01 = forwarded products; h2 * x[n-2]
    bus(A+2, P_MUL0);
    bus(A+2, P_MUL1);
    prog[A+2].status_ld = 1'b1;
    fu(A+2, 1, OM(P_MUL0 % N_OM), OM(P_MUL1 % N_OM));
    fu(A+2, I_MUL0, RF(3), RF(6));
    // D: s012 = h2x2 + s01; h3 * x[n-3]
    bus(A+3, P_MUL0);
    bus(A+3, P_ADD1);
    fu(A+3, 0, OM(P_MUL0 % N_OM), OM(P_ADD1 % N_OM));
    fu(A+3, I_MUL1, RF(4), RF(7));
    // E: y = s012 + h3x3; r7 <= r6
    bus(A+4, P_ADD0);
    bus(A+4, P_MUL1);
    fu(A+4, 1, OM(P_ADD0 % N_OM), OM(P_MUL1 % N_OM));
    fu(A+4, 2, RF(6), K(0));
    // F: store y; r13++; r6 <= r5; loop
    wb(A+5, P_ADD2, 7);
    bus(A+5, P_ADD1);
    mem_wr(A+5, 1, RF(13), OM(P_ADD1 % N_OM));
    fu(A+5, 3, RF(13), K(1));
    fu(A+5, I_SUB0, RF(5), RF(0));
    ctl(A+5, CTL_BRT, -5);
    // G (delay slot): r13, r6 written; r5 <= r8
    wb(A+6, P_ADD3, 13);
    wb(A+6, P_SUB0, 6);
    fu(A+6, FU_SUB0 + 1, RF(8), RF(0));
    ctl(A+7, CTL_HALT);
    fir_end = A + 7;
  endtask

  initial begin
    logic [XLEN-1:0] x [NS];
    logic [XLEN-1:0] d, yexp;
    int cycles;
    cmem_we = 1'b0; cmem_waddr = '0; cmem_wdata = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    for (int t = 0; t < 4; t++) h[t] = $urandom_range(0, 2000) - 1000;
    for (int n = 0; n < int'(NS); n++) begin
      x[n] = $urandom_range(0, 60000) - 30000;
      host_write(X0 + n, x[n]);
    end
    build_fir();
    load_prog();
    run(cycles);
    $display("FIR (power configuration): %0d samples in %0d cycles", NS, cycles);
    chk(cycles, 7 * NS + 8, "FIR cycle count");
    for (int n = 0; n < int'(NS); n++) begin
      yexp = '0;
      for (int t = 0; t < 4; t++) if (n - t >= 0) yexp += h[t] * x[n-t];
      host_read(Y0 + n, d);
      chk(d, yexp, $sformatf("y[%0d]", n));
    end
    chk(32'(pc), 32'(fir_end + 1), "halt address");
    $display("forwarded operands %0d, branches taken %0d / fallen through %0d, delay slots %0d",
             n_fwd, n_br_taken, n_br_fall, n_delay);
    chk(32'(n_fwd > 0), 1, "forwarding happened");
    chk(32'(n_br_taken == int'(NS) - 1), 1, "loop branch taken N-1 times");
    chk(32'(n_br_fall == 1), 1, "loop exit happened once");
    chk(32'(n_delay > 0), 1, "delay slot happened");
    chk(32'(n_rf4 > 0), 1, "both RF write ports in one cycle");
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
