// tb_nima_top_motion: motion-estimation kernel (block matching by sum of
// absolute differences) on the NIMA processor at its default
// (performance-objective) configuration.
//
// A reference block of B pixels is compared with the B pixels at each of K
// candidate positions of a frame row; the kernel keeps the smallest sum of
// absolute differences (SAD) and the position that gave it, and stores both.
// Per pixel, both memory ports read at once, a subtractor forms d = r - f,
// the ALU forms m = d >>> 31 and x = d ^ m, a second subtractor gives
// |d| = x - m and an adder accumulates; the pointers advance on two other
// adders and the comparator tests the loop bound. That is six control words
// per pixel, the loop branch in the fifth and the accumulate in its delay
// slot. After each candidate a compare and a branch-if-false skip the update
// of the best match. Checks the stored SAD and position against a model, the
// exact cycle count (K (6 B + 11) + 10, less two for each candidate that
// does not improve on the best), and that both outcomes of the
// branch-if-false happened. A watchdog ends the run after a fixed number of
// cycles.
module tb_nima_top_motion;
  import nima_pkg::*;
  localparam int unsigned XLEN = 32, N_ADD = 4, N_MUL = 2, N_SUB = 2, N_CMP = 1, N_ALU = 1;
  localparam int unsigned N_MEMP = 2, RF_RP = 8, RF_WP = 4, RF_DEPTH = 32;
  localparam bit          FWD = 1'b1;
  localparam int unsigned CMEM_DEPTH = 256, DMEM_DEPTH = 1024;
  `include "nima_cw.svh"
  localparam int unsigned CW_W = $bits(cw_t);

  localparam int unsigned PROG = 32;
  localparam int unsigned B    = 16;       // pixels per block
  localparam int unsigned NK   = 16;       // candidate positions
  localparam int unsigned FR   = 64;       // frame row base address
  localparam int unsigned OUT  = 1000;     // best SAD at OUT, its position at OUT+1

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

  // registers: r4 = 31, r5 d, r6 m, r7 SAD, r10 block pointer, r11 frame
  // pointer, r12 = B, r13 best SAD, r14 candidate, r15 best candidate,
  // r16 candidate frame base, r17 = NK, r18 = OUT + 1
  task automatic build_motion();
    int W, X;
    clear_prog();
    fu(0, 0, RF(0), K(31));
    wb(1, P_ADD0, 4);   fu(1, 0, RF(0), K(B));
    wb(2, P_ADD0, 12);  fu(2, 0, RF(0), K(32'h7FFF_FFFF));
    wb(3, P_ADD0, 13);  fu(3, 0, RF(0), K(FR)); fu(3, 2, RF(0), K(FR));
    wb(4, P_ADD0, 16);  wb(4, P_ADD2, 11);      fu(4, 0, RF(0), K(NK));
    wb(5, P_ADD0, 17);  fu(5, 0, RF(0), K(OUT + 1));
    wb(6, P_ADD0, 18);  fu(6, 0, RF(0), K(0)); fu(6, 2, RF(0), K(0)); fu(6, 3, RF(0), K(0));
    wb(7, P_ADD0, 14);  wb(7, P_ADD2, 15);      wb(7, P_ADD3, 10);
    fu(7, 1, RF(0), RF(0));                      // SAD = 0, written in W0
    W = 8;
    // W0: read r and f; advance both pointers
    wb(W, P_ADD1, 7);
    mem_rd(W, 0, RF(10));
    mem_rd(W, 1, RF(11));
    fu(W, 0, RF(10), K(1));
    fu(W, 1, RF(11), K(1));
    // W1: d = r - f; loop test: next block pointer < B
    wb(W+1, P_ADD0, 10);
    wb(W+1, P_ADD1, 11);
    bus(W+1, P_MEM0);
    bus(W+1, P_MEM1);
    fu(W+1, I_SUB0, OM(P_MEM0 % N_OM), OM(P_MEM1 % N_OM));
    fu(W+1, I_CMP0, OM(P_ADD0 % N_OM), RF(12), CMP_LT);
    // W2: m = d >>> 31
    prog[W+2].status_ld = 1'b1;
    wb(W+2, P_SUB0, 5);
    fu(W+2, I_ALU0, OM(P_SUB0 % N_OM), RF(4), ALU_SRA);
    // W3: x = d ^ m
    wb(W+3, P_ALU0, 6);
    fu(W+3, I_ALU0, RF(5), OM(P_ALU0 % N_OM), ALU_XOR);
    // W4: |d| = x - m; loop
    bus(W+4, P_ALU0);
    fu(W+4, FU_SUB0 + 1, OM(P_ALU0 % N_OM), RF(6));
    ctl(W+4, CTL_BRT, -4);
    // W5 (delay slot): SAD += |d|, written in the next word
    bus(W+5, FU_SUB0 + 1);
    fu(W+5, 1, RF(7), OM((FU_SUB0 + 1) % N_OM));
    X = W + 6;
    // X0: SAD final; SAD < best?
    wb(X, P_ADD1, 7);
    fu(X, I_CMP0, OM(P_ADD1 % N_OM), RF(13), CMP_LT);
    prog[X+1].status_ld = 1'b1;
    ctl(X+2, CTL_BRF, 4);                        // to X6; X3 is the delay slot
    // X4, X5: best = SAD, best candidate = candidate
    fu(X+4, 0, RF(7), K(0));
    fu(X+4, 2, RF(14), K(0));
    wb(X+5, P_ADD0, 13);
    wb(X+5, P_ADD2, 15);
    // X6: next candidate and its frame base
    fu(X+6, 0, RF(14), K(1));
    fu(X+6, 1, RF(16), K(1));
    fu(X+6, 2, RF(16), K(1));
    // X7: candidate < NK?; block pointer = 0
    wb(X+7, P_ADD0, 14);
    wb(X+7, P_ADD1, 16);
    wb(X+7, P_ADD2, 11);
    fu(X+7, I_CMP0, OM(P_ADD0 % N_OM), RF(17), CMP_LT);
    fu(X+7, 3, RF(0), RF(0));
    prog[X+8].status_ld = 1'b1;
    wb(X+8, P_ADD3, 10);
    ctl(X+9, CTL_BRT, W - (X + 9));
    fu(X+10, 1, RF(0), RF(0));                  // delay slot: SAD = 0
    // X11: store the result
    mem_wr(X+11, 0, K(OUT), RF(13));
    mem_wr(X+11, 1, RF(18), RF(15));
    ctl(X+12, CTL_HALT);
  endtask

  int brf_taken = 0, brf_fall = 0;
  always @(posedge clk)
    if (rst_n && !halted && dut.cw.ctl == CTL_BRF) begin
      if (!status) brf_taken++; else brf_fall++;
    end

  initial begin
    logic [7:0] r [B];
    logic [7:0] f [B + NK - 1];
    logic [XLEN-1:0] d;
    int cycles, best, best_k, plant, kept;
    cmem_we = 1'b0; cmem_waddr = '0; cmem_wdata = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    plant = 9;
    for (int j = 0; j < int'(B); j++) r[j] = 8'($urandom);
    for (int j = 0; j < int'(B + NK - 1); j++) f[j] = 8'($urandom);
    // a near copy of the block at one position, so the best match is known to move
    for (int j = 0; j < int'(B); j++) f[plant + j] = r[j] ^ 8'(j % 2);
    for (int j = 0; j < int'(B); j++) host_write(j, {24'b0, r[j]});
    for (int j = 0; j < int'(B + NK - 1); j++) host_write(FR + j, {24'b0, f[j]});
    // reference model
    best = 32'h7FFF_FFFF; best_k = 0; kept = 0;
    for (int k = 0; k < int'(NK); k++) begin
      int s;
      s = 0;
      for (int j = 0; j < int'(B); j++)
        s += (r[j] > f[k + j]) ? int'(r[j]) - int'(f[k + j]) : int'(f[k + j]) - int'(r[j]);
      if (s < best) begin best = s; best_k = k; end
      else kept++;
    end
    build_motion();
    load_prog();
    run(cycles);
    $display("motion: %0d candidates of %0d pixels in %0d cycles, best %0d at %0d",
             NK, B, cycles, best, best_k);
    chk(cycles, NK * (6 * B + 11) + 10 - 2 * kept, "motion cycle count");
    host_read(OUT, d);     chk(d, best, "best SAD");
    host_read(OUT + 1, d); chk(d, best_k, "best position");
    chk(32'(best_k == plant), 1, "planted match found by the model");
    $display("branch-if-false taken %0d, fallen through %0d; forwarded operands %0d",
             brf_taken, brf_fall, n_fwd);
    chk(32'(brf_taken > 0), 1, "best match kept (branch-if-false taken)");
    chk(32'(brf_fall > 0), 1, "best match updated (branch-if-false not taken)");
    chk(32'(brf_taken + brf_fall == int'(NK)), 1, "one decision per candidate");
    chk(brf_taken, kept, "candidates that kept the best match");
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
