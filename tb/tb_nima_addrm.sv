// tb_nima_addrm: self-checking testbench for nima_addrm (Controller_addrM).
//
// Checks that select 0 returns the link register, selects 1..N_OM the low
// bits of the matching output bus and larger selects address 0.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_addrm;
  localparam int unsigned N_OM = 4;
  localparam int unsigned PCW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0]             sel;
  logic [PCW-1:0]         lr, addr, exp_a;
  logic [N_OM-1:0][31:0]  om;

  nima_addrm #(.PCW(PCW), .XLEN(32), .N_OM(N_OM)) dut (
    .sel(sel), .lr(lr), .om(om), .addr(addr));

  initial begin
    for (int n = 0; n < 200; n++) begin
      lr = $urandom;
      for (int g = 0; g < int'(N_OM); g++) om[g] = $urandom;
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        exp_a = (s == 0) ? lr : (s <= int'(N_OM)) ? om[s-1][PCW-1:0] : '0;
        checks++;
        if (addr !== exp_a) begin
          failures++;
          $display("FAIL sel=%0d addr=%h expected %h", s, addr, exp_a);
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
