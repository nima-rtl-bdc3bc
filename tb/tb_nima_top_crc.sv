// tb_nima_top_crc: CRC-32 kernel on the NIMA processor at its default
// (performance-objective) configuration.
//
// Computes the reflected CRC-32 (polynomial 0xEDB88320, initial value and
// final inversion all ones) of a byte string, one byte per data-memory word,
// bit-serially:
//   crc ^= byte; 8 times: crc = (crc >> 1) ^ (POLY & (0 - (crc & 1)))
// The data-path has one ALU, so the four logic operations of each bit follow
// each other; the subtractor makes the mask and results are forwarded from
// the ALU back into itself, giving four control words per bit. The bytes of
// one buffer are an unrolled loop body with a compare-and-branch per byte.
// Checked against the standard check value CRC32("123456789") = 0xCBF43926
// and against a reference model on random buffers, with the exact cycle count
// (36 per byte + 7). A watchdog ends the run after a fixed number of cycles.
module tb_nima_top_crc;
  import nima_pkg::*;
  localparam int unsigned XLEN = 32, N_ADD = 4, N_MUL = 2, N_SUB = 2, N_CMP = 1, N_ALU = 1;
  localparam int unsigned N_MEMP = 2, RF_RP = 8, RF_WP = 4, RF_DEPTH = 32;
  localparam bit          FWD = 1'b1;
  localparam int unsigned CMEM_DEPTH = 256, DMEM_DEPTH = 1024;
  `include "nima_cw.svh"
  localparam int unsigned CW_W = $bits(cw_t);

  localparam int unsigned PROG   = 64;
  localparam int unsigned OUT    = 1000;        // result address
  localparam logic [31:0] POLY   = 32'hEDB8_8320;

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

  // registers: r1 crc, r2 POLY, r3 shifted crc, r10 byte pointer, r11 length
  task automatic build_crc(input int unsigned nbytes);
    int c, L0, S;
    clear_prog();
    fu(0, 0, RF(0), K(32'hFFFF_FFFF));
    fu(1, 0, RF(0), K(POLY));        wb(1, P_ADD0, 1);
    fu(2, 0, RF(0), K(nbytes));      wb(2, P_ADD0, 2);
    wb(3, P_ADD0, 11);
    L0 = 4;
    // L0: load byte, pointer + 1
    mem_rd(L0, 0, RF(10));
    fu(L0, 0, RF(10), K(1));
    // L1: crc ^= byte (byte forwarded from memory); compare pointer + 1 < length
    wb(L0+1, P_ADD0, 10);
    bus(L0+1, P_MEM0);
    fu(L0+1, I_ALU0, RF(1), OM(P_MEM0 % N_OM), ALU_XOR);
    fu(L0+1, I_CMP0, OM(P_ADD0 % N_OM), RF(11), CMP_LT);
    S = L0 + 2;
    prog[S].status_ld = 1'b1;
    for (int b = 0; b < 8; b++) begin
      // S: crc written to r1; t = crc & 1 (crc forwarded)
      wb(S, P_ALU0, 1);
      fu(S, I_ALU0, OM(P_ALU0 % N_OM), K(1), ALU_AND);
      // S+1: m = 0 - t; s = crc >> 1
      bus(S+1, P_ALU0);
      fu(S+1, I_SUB0, RF(0), OM(P_ALU0 % N_OM));
      fu(S+1, I_ALU0, RF(1), K(1), ALU_SRL);
      // S+2: r3 = s; m2 = m & POLY
      wb(S+2, P_ALU0, 3);
      bus(S+2, P_SUB0);
      fu(S+2, I_ALU0, OM(P_SUB0 % N_OM), RF(2), ALU_AND);
      // S+3: crc = s ^ m2
      bus(S+3, P_ALU0);
      fu(S+3, I_ALU0, OM(P_ALU0 % N_OM), RF(3), ALU_XOR);
      S += 4;
    end
    // S: crc written; loop over bytes (word S+1 is the delay slot)
    wb(S, P_ALU0, 1);
    ctl(S, CTL_BRT, L0 - S);
    // exit: result = ~crc, stored at OUT
    fu(S+2, I_ALU0, RF(1), RF(0), ALU_NOR);
    bus(S+3, P_ALU0);
    mem_wr(S+3, 0, K(OUT), OM(P_ALU0 % N_OM));
    ctl(S+4, CTL_HALT);
  endtask

  function automatic logic [31:0] crc_ref(input logic [7:0] data [], input int unsigned n);
    logic [31:0] crc;
    crc = 32'hFFFF_FFFF;
    for (int i = 0; i < int'(n); i++) begin
      crc ^= {24'b0, data[i]};
      for (int k = 0; k < 8; k++) crc = crc[0] ? ((crc >> 1) ^ POLY) : (crc >> 1);
    end
    return ~crc;
  endfunction

  task automatic run_buffer(input logic [7:0] data [], input int unsigned n, input logic [31:0] expv,
                            input string what);
    int cycles;
    logic [31:0] d;
    @(negedge clk) rst_n = 1'b0;
    for (int i = 0; i < int'(n); i++) host_write(i, {24'b0, data[i]});
    host_write(OUT, 32'h0);
    build_crc(n);
    load_prog();
    run(cycles);
    chk(cycles, 36 * n + 7, {what, " cycle count"});
    host_read(OUT, d);
    chk(d, expv, what);
    $display("%s: %0d bytes, crc %h, %0d cycles", what, n, d, cycles);
  endtask

  initial begin
    logic [7:0] buf9 [];
    logic [7:0] bufr [];
    cmem_we = 1'b0; cmem_waddr = '0; cmem_wdata = '0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    buf9 = new[9];
    for (int i = 0; i < 9; i++) buf9[i] = 8'h31 + 8'(i);         // "123456789"
    run_buffer(buf9, 9, 32'hCBF4_3926, "check string");
    for (int r = 0; r < 3; r++) begin
      int unsigned n;
      n = $urandom_range(1, 48);
      bufr = new[n];
      for (int i = 0; i < int'(n); i++) bufr[i] = 8'($urandom);
      run_buffer(bufr, n, crc_ref(bufr, n), $sformatf("random buffer %0d", r));
    end
    chk(32'(n_fwd > 0 && n_br_taken > 0 && n_br_fall == 4), 1, "forwarding and byte loop happened");
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
