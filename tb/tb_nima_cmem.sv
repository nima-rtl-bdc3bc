// tb_nima_cmem: self-checking testbench for nima_cmem.
//
// Checks that the CW register is zero after reset, loads random words through
// the load port, then reads them back in random order one cycle after the
// address is presented, and checks that hold freezes the CW register.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_cmem;
  localparam int unsigned CW_W = 70, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic            we, hold;
  logic [3:0]      waddr, raddr;
  logic [CW_W-1:0] wdata, cw, prev;
  logic [CW_W-1:0] model [DEPTH];

  nima_cmem #(.CW_W(CW_W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .hold, .cw);

  task automatic chk(input logic [CW_W-1:0] e, input string what);
    checks++;
    if (cw !== e) begin
      failures++;
      $display("FAIL %s cw=%h expected %h", what, cw, e);
    end
  endtask

  initial begin
    we = 1'b0; hold = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk); #1 chk('0, "reset");
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(i);
      wdata = {$urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    chk('0, "held in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      prev = cw;
      raddr = 4'($urandom);
      hold  = ($urandom_range(0, 4) == 0);
      @(posedge clk); #1;
      chk(hold ? prev : model[raddr], hold ? "hold" : "fetch");
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
