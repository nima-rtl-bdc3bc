// tb_nima_fu_slot: self-checking testbench for nima_fu_slot.
//
// Four slots share random stimulus: an adder with input registers (the
// performance configuration), a multiplier with output registers (the power
// configuration), a comparator with both, and an ALU with neither and no
// forwarding. Each cycle the testbench computes the expected result from the
// selected operands and operation, and checks each slot's output after its
// latency (IREG + OREG cycles). A watchdog ends the run after a fixed number
// of clock cycles.
module tb_nima_fu_slot;
  import nima_pkg::*;
  localparam int unsigned N_OM = 4;
  localparam int unsigned SW  = idx_w(SRC_OM0 + N_OM);   // with forwarding
  localparam int unsigned SW0 = idx_w(SRC_OM0);          // without
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [SW-1:0]          sel_a, sel_b;
  logic [FU_OP_W-1:0]     op;
  logic [31:0]            rf_a, rf_b, cnst;
  logic [N_OM-1:0][31:0]  om;
  logic [3:0][31:0]       y;
  logic [3:0][31:0]       hist [3];   // expected results, by age in cycles

  nima_fu_slot #(.KIND(FU_ADD), .N_OM(N_OM), .FWD(1'b1), .IREG(1'b1), .OREG(1'b0)) u_add (
    .clk, .rst_n, .sel_a, .sel_b, .op, .rf_a, .rf_b, .cnst, .om, .y(y[0]));
  nima_fu_slot #(.KIND(FU_MUL), .N_OM(N_OM), .FWD(1'b1), .IREG(1'b0), .OREG(1'b1)) u_mul (
    .clk, .rst_n, .sel_a, .sel_b, .op, .rf_a, .rf_b, .cnst, .om, .y(y[1]));
  nima_fu_slot #(.KIND(FU_CMP), .N_OM(N_OM), .FWD(1'b1), .IREG(1'b1), .OREG(1'b1)) u_cmp (
    .clk, .rst_n, .sel_a, .sel_b, .op, .rf_a, .rf_b, .cnst, .om, .y(y[2]));
  nima_fu_slot #(.KIND(FU_ALU), .N_OM(N_OM), .FWD(1'b0), .IREG(1'b0), .OREG(1'b0)) u_alu (
    .clk, .rst_n, .sel_a(sel_a[SW0-1:0]), .sel_b(sel_b[SW0-1:0]), .op, .rf_a, .rf_b, .cnst,
    .om, .y(y[3]));

  function automatic logic [31:0] pick(input int s, input logic [31:0] r, input bit fwd);
    if (s == 0) return r;
    if (s == 1) return cnst;
    if (fwd && s < 2 + int'(N_OM)) return om[s-2];
    return '0;
  endfunction

  function automatic logic [31:0] cmp_ref(input logic [31:0] a, input logic [31:0] b, input int o);
    int signed sa, sb;
    sa = a; sb = b;
    case (o)
      0: return 32'(a == b);
      1: return 32'(a != b);
      2: return 32'(sa < sb);
      3: return 32'(sa >= sb);
      4: return 32'(a < b);
      5: return 32'(a >= b);
      6: return 32'(sa <= sb);
      default: return 32'(sa > sb);
    endcase
  endfunction

  function automatic logic [31:0] alu_ref(input logic [31:0] a, input logic [31:0] b, input int o);
    int signed sa;
    sa = a;
    case (o)
      0: return a & b;
      1: return a | b;
      2: return a ^ b;
      3: return ~(a | b);
      4: return a << b[4:0];
      5: return a >> b[4:0];
      6: return 32'(sa >>> b[4:0]);
      default: return a;
    endcase
  endfunction

  initial begin
    logic [31:0] a1, b1, a0, b0;
    logic [3:0][31:0] e;
    sel_a = '0; sel_b = '0; op = '0; rf_a = '0; rf_b = '0; cnst = '0; om = '0;
    for (int h = 0; h < 3; h++) hist[h] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sel_a = SW'($urandom_range(0, SRC_OM0 + N_OM - 1));
      sel_b = SW'($urandom_range(0, SRC_OM0 + N_OM - 1));
      op    = FU_OP_W'($urandom);
      rf_a  = $urandom; rf_b = $urandom; cnst = $urandom;
      for (int g = 0; g < int'(N_OM); g++) om[g] = (g == 0) ? rf_a : $urandom;
      a1 = pick(int'(sel_a), rf_a, 1'b1); b1 = pick(int'(sel_b), rf_b, 1'b1);
      a0 = pick(int'(sel_a[SW0-1:0]), rf_a, 1'b0); b0 = pick(int'(sel_b[SW0-1:0]), rf_b, 1'b0);
      e[0] = a1 + b1;
      e[1] = a1 * b1;
      e[2] = cmp_ref(a1, b1, int'(op));
      e[3] = alu_ref(a0, b0, int'(op));
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = e;
      #1;
      // alu: latency 0
      checks++;
      if (y[3] !== hist[0][3]) begin failures++; $display("FAIL alu %h exp %h", y[3], hist[0][3]); end
      @(posedge clk); #1;
      // adder and multiplier: latency 1 (their input was hist[0] before this edge)
      checks += 2;
      if (y[0] !== hist[0][0]) begin failures++; $display("FAIL add %h exp %h", y[0], hist[0][0]); end
      if (y[1] !== hist[0][1]) begin failures++; $display("FAIL mul %h exp %h", y[1], hist[0][1]); end
      // comparator: latency 2
      if (n > 0) begin
        checks++;
        if (y[2] !== hist[1][2]) begin failures++; $display("FAIL cmp %h exp %h", y[2], hist[1][2]); end
      end
    end
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
