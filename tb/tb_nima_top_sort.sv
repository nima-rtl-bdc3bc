// tb_nima_top_sort: sort kernel (bubble sort) on the NIMA processor at its
// default (performance-objective) configuration.
//
// Sorts N signed words in data memory in place. The inner step is
// branch-free and spreads over several FUs at once:
//   c = a[i] > a[i+1] (comparator),  d = a[i+1] - a[i] (subtractor),
//   p = c * d (multiplier),  a[i] += p (adder),  a[i+1] -= p (subtractor),
// and both results are written back through the two memory ports in the same
// control word. Six control words per compare-and-swap, with the loop branch
// in the fifth and the write-back in its delay slot; an outer loop shortens
// the pass each time. Checks the sorted array against a reference sort and
// the cycle count (3 N^2 + 3 N - 3, that is 6 words per inner step and 6 per pass
// plus the prologue), and that the nested loops, the dual-port writes and
// forwarding happened. A watchdog ends the run after a fixed number of cycles.
module tb_nima_top_sort;
  import nima_pkg::*;
  localparam int unsigned XLEN = 32, N_ADD = 4, N_MUL = 2, N_SUB = 2, N_CMP = 1, N_ALU = 1;
  localparam int unsigned N_MEMP = 2, RF_RP = 8, RF_WP = 4, RF_DEPTH = 32;
  localparam bit          FWD = 1'b1;
  localparam int unsigned CMEM_DEPTH = 256, DMEM_DEPTH = 1024;
  `include "nima_cw.svh"
  localparam int unsigned CW_W = $bits(cw_t);

  localparam int unsigned PROG = 32;
  localparam int unsigned NS   = 24;     // elements

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

  // registers: r5 a[i], r6 a[i+1], r9 i+1, r10 i, r12 pass length
  task automatic build_sort(input int unsigned n);
    int O, I;
    clear_prog();
    fu(0, 0, RF(0), K(n - 1));
    wb(1, P_ADD0, 12);
    O = 2;
    // O: i = 0, delivered on OM3 to the inner loop
    fu(O, 3, RF(0), K(0));
    I = O + 1;
    // I0: read a[i]; i + 1
    wb(I, P_ADD3, 10);
    mem_rd(I, 0, OM(P_ADD3 % N_OM));
    fu(I, 0, OM(P_ADD3 % N_OM), K(1));
    // I1: r9 = i + 1, r5 = a[i]; read a[i+1]; loop test i + 1 < pass
    wb(I+1, P_ADD0, 9);
    wb(I+1, P_MEM0, 5);
    mem_rd(I+1, 1, OM(P_ADD0 % N_OM));
    fu(I+1, I_CMP0, OM(P_ADD0 % N_OM), RF(12), CMP_LT);
    // I2: r6 = a[i+1]; c = a[i] > a[i+1]; d = a[i+1] - a[i]
    prog[I+2].status_ld = 1'b1;
    wb(I+2, P_MEM1, 6);
    fu(I+2, I_CMP0, RF(5), OM(P_MEM1 % N_OM), CMP_GT);
    fu(I+2, I_SUB0, OM(P_MEM1 % N_OM), RF(5));
    // I3: p = c * d
    bus(I+3, FU_CMP0);
    bus(I+3, P_SUB0);
    fu(I+3, I_MUL0, OM(FU_CMP0 % N_OM), OM(P_SUB0 % N_OM));
    // I4: a[i] + p, a[i+1] - p; loop
    bus(I+4, P_MUL0);
    fu(I+4, 1, RF(5), OM(P_MUL0 % N_OM));
    fu(I+4, FU_SUB0 + 1, RF(6), OM(P_MUL0 % N_OM));
    ctl(I+4, CTL_BRT, -4);
    // I5 (delay slot): write both words back at once; next i = i + 1
    bus(I+5, P_ADD1);
    bus(I+5, FU_SUB0 + 1);
    mem_wr(I+5, 0, RF(10), OM(P_ADD1 % N_OM));
    mem_wr(I+5, 1, RF(9), OM((FU_SUB0 + 1) % N_OM));
    fu(I+5, 3, RF(9), K(0));
    // O1..O5: pass - 1, loop while it is above zero
    fu(I+6, I_SUB0, RF(12), K(1));
    wb(I+7, P_SUB0, 12);
    fu(I+7, I_CMP0, OM(P_SUB0 % N_OM), RF(0), CMP_GT);
    prog[I+8].status_ld = 1'b1;
    ctl(I+9, CTL_BRT, O - (I + 9));
    ctl(I+11, CTL_HALT);
  endtask

  initial begin
    logic [XLEN-1:0] a [NS];
    logic [XLEN-1:0] d;
    int cycles, swaps_possible;
    cmem_we = 1'b0; cmem_waddr = '0; cmem_wdata = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    for (int i = 0; i < int'(NS); i++) begin
      a[i] = $urandom;
      if (i == 3) a[i] = a[1];              // a duplicate
      host_write(i, a[i]);
    end
    build_sort(NS);
    load_prog();
    run(cycles);
    $display("sort: %0d elements in %0d cycles", NS, cycles);
    chk(cycles, 3 * NS * NS + 3 * NS - 3, "sort cycle count");
    begin
      int signed s [NS];
      for (int i = 0; i < int'(NS); i++) s[i] = a[i];
      for (int i = 1; i < int'(NS); i++)      // reference: insertion sort
        for (int j = i; j > 0 && s[j-1] > s[j]; j--) begin
          int signed t;
          t = s[j]; s[j] = s[j-1]; s[j-1] = t;
        end
      for (int i = 0; i < int'(NS); i++) begin
        host_read(i, d);
        chk(d, s[i], $sformatf("a[%0d]", i));
      end
    end
    $display("forwarded operands %0d, branches taken %0d / fallen through %0d, dual-port cycles %0d",
             n_fwd, n_br_taken, n_br_fall, n_dual_mem);
    chk(32'(n_br_fall == int'(NS)), 1, "inner loop left once per pass, outer loop once");
    chk(32'(n_fwd > 0), 1, "forwarding happened");
    chk(32'(dual_wr > 0), 1, "both memory ports wrote in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dual_wr = 0;
  always @(posedge clk) if (rst_n && !halted && dut.cw.mem_we == 2'b11) dual_wr++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
