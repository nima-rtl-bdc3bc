// tb_nima_comp: self-checking testbench for nima_comp.
//
// Drives random and corner-case operands for every operation and compares y with a reference
// computed in the testbench. A watchdog ends the run after a fixed number of
// clock cycles.
module tb_nima_comp;
  import nima_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y, exp_y;
  cmp_op_e op;
  nima_comp #(.XLEN(32)) dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [31:0] ref_model(input logic [31:0] x, input logic [31:0] z, input cmp_op_e o);
    int signed sx, sz;
    sx = x; sz = z;
    case (o)
      CMP_EQ:  return {31'b0, x == z};
      CMP_NE:  return {31'b0, x != z};
      CMP_LT:  return {31'b0, sx < sz};
      CMP_GE:  return {31'b0, sx >= sz};
      CMP_LTU: return {31'b0, x < z};
      CMP_GEU: return {31'b0, x >= z};
      CMP_LE:  return {31'b0, sx <= sz};
      default: return {31'b0, sx > sz};
    endcase
  endfunction

  task automatic check_one(input logic [31:0] x, input logic [31:0] z, input cmp_op_e o);
    a = x; b = z; op = o;
    #1;
    exp_y = ref_model(x, z, o);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL a=%h b=%h op=%0d y=%h expected %h", x, z, o, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int o = 0; o < 8; o++) check_one(corner[i], corner[j], cmp_op_e'(o));
    for (int n = 0; n < 2000; n++)
      check_one($urandom, (n % 4 == 0) ? a : $urandom, cmp_op_e'($urandom_range(0, 7)));
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
