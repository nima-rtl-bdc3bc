// tb_nima_dmem: self-checking testbench for nima_dmem (dual port).
//
// Fills the memory through both ports, then issues random mixed reads and
// writes on both ports, checking that each read returns, one cycle later,
// the word a reference array held before that cycle's writes.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_dmem;
  localparam int unsigned DEPTH = 64, NP = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [NP-1:0]       we;
  logic [NP-1:0][5:0]  addr;
  logic [NP-1:0][31:0] wdata, rdata, exp_r;
  logic [31:0]         model [DEPTH];

  nima_dmem #(.XLEN(32), .DEPTH(DEPTH), .NP(NP)) dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    we = '0; addr = '0; wdata = '0;
    for (int i = 0; i < int'(DEPTH); i += 2) begin
      @(negedge clk);
      we = '1; addr[0] = 6'(i); addr[1] = 6'(i + 1);
      wdata[0] = $urandom; wdata[1] = $urandom;
      model[i] = wdata[0]; model[i+1] = wdata[1];
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < int'(NP); p++) begin
        addr[p]  = 6'($urandom);
        we[p]    = $urandom_range(0, 1);
        wdata[p] = $urandom;
      end
      if (we[0] && we[1] && addr[0] == addr[1]) we[0] = 1'b0;
      for (int p = 0; p < int'(NP); p++) exp_r[p] = model[addr[p]];
      @(posedge clk);
      for (int p = 0; p < int'(NP); p++) if (we[p]) model[addr[p]] = wdata[p];
      #1;
      for (int p = 0; p < int'(NP); p++) begin
        checks++;
        if (rdata[p] !== exp_r[p]) begin
          failures++;
          $display("FAIL port %0d addr %0d = %h expected %h", p, addr[p], rdata[p], exp_r[p]);
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
