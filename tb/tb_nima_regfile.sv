// tb_nima_regfile: self-checking testbench for nima_regfile (8 read x 4 write).
//
// Each cycle writes random registers through up to four write ports (never
// two to the same register) and reads eight random registers, comparing the
// read data with a reference array. Also checks that register 0 stays zero
// and that a same-cycle read returns the old value. A watchdog ends the run
// after a fixed number of clock cycles.
module tb_nima_regfile;
  localparam int unsigned NRP = 8, NWP = 4, DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NRP-1:0][4:0]  raddr;
  logic [NRP-1:0][31:0] rdata;
  logic [NWP-1:0]       we;
  logic [NWP-1:0][4:0]  waddr;
  logic [NWP-1:0][31:0] wdata;
  logic [31:0]          model [DEPTH];

  nima_regfile #(.XLEN(32), .DEPTH(DEPTH), .NRP(NRP), .NWP(NWP)) dut (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    for (int r = 0; r < int'(DEPTH); r++) model[r] = '0;
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // choose distinct write addresses
      for (int p = 0; p < int'(NWP); p++) begin
        we[p]    = ($urandom_range(0, 3) != 0);
        waddr[p] = 5'(p * 8 + $urandom_range(0, 7));
        wdata[p] = $urandom;
      end
      for (int r = 0; r < int'(NRP); r++) raddr[r] = (r == 0 && n % 3 == 0) ? waddr[0] : 5'($urandom);
      #1;
      for (int r = 0; r < int'(NRP); r++) begin   // reads see the old contents
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++;
          $display("FAIL read port %0d reg %0d = %h expected %h", r, raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < int'(NWP); p++)
        if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
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
