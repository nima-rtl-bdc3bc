// nima_tb_asm.svh: control-word assembler, host helpers and mechanism
// counters shared by the NIMA processor testbenches.
//
// Included inside a testbench module after its configuration localparams,
// the include of nima_cw.svh, CW_W, PROG, the clock, the reset and the
// signals of the processor instance `dut`. The assembler routes each operand
// through its round-robin RF read port, the constant or a forwarded bus, and
// counts an error when one word uses a read port, a group bus or the
// constant for two different things.

  // ---------------- control-word assembler ----------------
  typedef enum int {S_RF, S_CONST, S_OM} src_kind_e;
  typedef struct { src_kind_e kind; int unsigned val; } src_t;

  cw_t             prog [PROG];
  bit [RF_RP-1:0]  port_used [PROG];
  bit [N_OM-1:0]   grp_used  [PROG];
  bit              const_used [PROG];

  function automatic src_t RF(input int unsigned r);    return '{S_RF, r};    endfunction
  function automatic src_t K(input int unsigned v);     return '{S_CONST, v}; endfunction
  function automatic src_t OM(input int unsigned g);    return '{S_OM, g};    endfunction

  task automatic asm_err(input int c, input string what);
    failures++;
    $display("ASSEMBLY CONFLICT in word %0d: %s", c, what);
  endtask

  task automatic route(input int c, input int unsigned k, input src_t s);
    int unsigned p;
    case (s.kind)
      S_RF: begin
        p = k % RF_RP;
        if (port_used[c][p] && prog[c].rd_addr[p] != RAW'(s.val)) asm_err(c, "RF read port");
        port_used[c][p] = 1'b1;
        prog[c].rd_addr[p] = RAW'(s.val);
        prog[c].opnd_sel[k] = SW'(SRC_RF);
      end
      S_CONST: begin
        if (const_used[c] && prog[c].cnst != XLEN'(s.val)) asm_err(c, "constant");
        const_used[c] = 1'b1;
        prog[c].cnst = XLEN'(s.val);
        prog[c].opnd_sel[k] = SW'(SRC_CONST);
      end
      default: prog[c].opnd_sel[k] = SW'(SRC_OM0 + s.val);
    endcase
  endtask

  // issue FU i in word c
  task automatic fu(input int c, input int unsigned i, input src_t a, input src_t b,
                    input int unsigned op = 0);
    route(c, 2 * i, a);
    route(c, 2 * i + 1, b);
    prog[c].fu_op[i] = FU_OP_W'(op);
  endtask

  // put producer p on its group bus in word c (for forwarding or writing)
  task automatic bus(input int c, input int unsigned p);
    int unsigned g;
    g = p % N_OM;
    if (grp_used[c][g] && prog[c].om_sel[g] != GSW'(p / N_OM)) asm_err(c, "group bus");
    grp_used[c][g] = 1'b1;
    prog[c].om_sel[g] = GSW'(p / N_OM);
  endtask

  // write producer p to register r in word c
  task automatic wb(input int c, input int unsigned p, input int unsigned r);
    bus(c, p);
    prog[c].wr_en[p % N_OM]   = 1'b1;
    prog[c].wr_addr[p % N_OM] = RAW'(r);
  endtask

  task automatic mem_rd(input int c, input int unsigned m, input src_t a);
    route(c, 2 * N_FU + 2 * m, a);
  endtask

  task automatic mem_wr(input int c, input int unsigned m, input src_t a, input src_t d);
    route(c, 2 * N_FU + 2 * m, a);
    route(c, 2 * N_FU + 2 * m + 1, d);
    prog[c].mem_we[m] = 1'b1;
  endtask

  task automatic ctl(input int c, input ctl_op_e op, input int off = 0, input int amsel = 0);
    prog[c].ctl       = op;
    prog[c].offset    = PCW'(off);
    prog[c].addrm_sel = AMW'(amsel);
  endtask

  task automatic clear_prog();
    for (int c = 0; c < int'(PROG); c++) begin
      prog[c] = '0; port_used[c] = '0; grp_used[c] = '0; const_used[c] = 1'b0;
    end
  endtask

  // producer numbers
  localparam int unsigned P_ADD0 = 0, P_ADD1 = 1, P_ADD2 = 2, P_ADD3 = 3;
  localparam int unsigned P_MUL0 = FU_MUL0, P_MUL1 = FU_MUL0 + 1, P_SUB0 = FU_SUB0;
  localparam int unsigned P_ALU0 = FU_ALU0, P_MEM0 = N_FU, P_MEM1 = N_FU + 1;
  localparam int unsigned I_MUL0 = FU_MUL0, I_MUL1 = FU_MUL0 + 1, I_SUB0 = FU_SUB0;
  localparam int unsigned I_CMP0 = FU_CMP0, I_ALU0 = FU_ALU0;

  // ---------------- host helpers ----------------
  task automatic load_prog();
    for (int c = 0; c < int'(PROG); c++) begin
      @(negedge clk);
      cmem_we = 1'b1; cmem_waddr = PCW'(c); cmem_wdata = prog[c];
    end
    @(negedge clk) cmem_we = 1'b0;
  endtask

  task automatic host_write(input int unsigned a, input logic [XLEN-1:0] d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = 10'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0; host_en = 1'b0;
  endtask

  task automatic host_read(input int unsigned a, output logic [XLEN-1:0] d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b0; host_addr = 10'(a);
    @(negedge clk);
    d = host_rdata;
    host_en = 1'b0;
  endtask

  task automatic run(output int cycles);
    @(negedge clk) rst_n = 1'b1;
    cycles = 0;
    while (!halted) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  task automatic chk(input logic [XLEN-1:0] got, input logic [XLEN-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_fwd = 0, n_br_taken = 0, n_br_fall = 0, n_call = 0, n_ret = 0, n_jind_bus = 0;
  int n_halt = 0, n_dual_mem = 0, n_rf4 = 0, n_status = 0, n_delay = 0;
  logic prev_xfer = 1'b0;
  always @(posedge clk) if (rst_n && !halted) begin
    cw_t w;
    logic xfer;
    w = dut.cw;
    for (int k = 0; k < int'(N_OPND); k++) if (int'(w.opnd_sel[k]) >= SRC_OM0) n_fwd++;
    xfer = 1'b0;
    case (w.ctl)
      CTL_BRT: if (status) begin n_br_taken++; xfer = 1'b1; end else n_br_fall++;
      CTL_BRF: if (!status) begin n_br_taken++; xfer = 1'b1; end else n_br_fall++;
      CTL_CALL: begin n_call++; xfer = 1'b1; end
      CTL_JIND: begin if (w.addrm_sel == 0) n_ret++; else n_jind_bus++; xfer = 1'b1; end
      CTL_JMP:  xfer = 1'b1;
      default: ;
    endcase
    if (prev_xfer) n_delay++;
    prev_xfer = xfer;
    if (w.mem_we[1] && int'(w.opnd_sel[2*N_FU]) == SRC_RF && !w.mem_we[0]) n_dual_mem++;
    if ($countones(w.wr_en) == int'(RF_WP)) n_rf4++;
    if (w.status_ld) n_status++;
  end
  always @(posedge clk) if (rst_n && halted) n_halt++;

