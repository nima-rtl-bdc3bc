// tb_nima_output_mux: self-checking testbench for nima_output_mux.
//
// A group of three members with random data; every select value, including
// the unused fourth, is checked against the expected member or zero.
// A watchdog ends the run after a fixed number of clock cycles.
module tb_nima_output_mux;
  localparam int unsigned N_IN = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0]             sel;
  logic [N_IN-1:0][31:0]  d;
  logic [31:0]            y, exp_y;

  nima_output_mux #(.XLEN(32), .N_IN(N_IN)) dut (.sel(sel), .d(d), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < int'(N_IN); i++) d[i] = $urandom;
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        exp_y = (s < int'(N_IN)) ? d[s] : '0;
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
