// tb_nima_adder: self-checking testbench for nima_adder.
//
// Drives random and corner-case operands and compares y with a reference
// computed in the testbench. A watchdog ends the run after a fixed number of
// clock cycles.
module tb_nima_adder;
  import nima_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y, exp_y;

  nima_adder #(.XLEN(32)) dut (.a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_model(input logic [31:0] x, input logic [31:0] z);
    return x + z;
  endfunction

  task automatic check_one(input logic [31:0] x, input logic [31:0] z);
    a = x; b = z;
    #1;
    exp_y = ref_model(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        check_one(corner[i], corner[j]);
    for (int n = 0; n < 2000; n++)
      check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
