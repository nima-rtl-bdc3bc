// tb_nima_operand_mux: self-checking testbench for nima_operand_mux.
//
// Drives distinct random values on the RF input, the constant and four
// forwarded buses, walks the select over every code (including unused ones)
// and checks the chosen value. A watchdog ends the run after a fixed number
// of clock cycles.
module tb_nima_operand_mux;
  import nima_pkg::*;
  localparam int unsigned N_OM = 4;
  localparam int unsigned SW = idx_w(SRC_OM0 + N_OM);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [SW-1:0]             sel;
  logic [31:0]               rf, cnst, y, exp_y;
  logic [N_OM-1:0][31:0]     om;

  nima_operand_mux #(.XLEN(32), .N_OM(N_OM), .FWD(1'b1)) dut (
    .sel(sel), .rf(rf), .cnst(cnst), .om(om), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      rf = $urandom; cnst = $urandom;
      for (int g = 0; g < int'(N_OM); g++) om[g] = $urandom;
      for (int s = 0; s < (1 << SW); s++) begin
        sel = SW'(s);
        #1;
        if (s == 0)                        exp_y = rf;
        else if (s == 1)                   exp_y = cnst;
        else if (s < 2 + int'(N_OM))       exp_y = om[s-2];
        else                               exp_y = '0;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL sel=%0d y=%h expected %h", s, y, exp_y);
        end
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
