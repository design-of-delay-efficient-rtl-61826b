// Testbench for cbm_alu: add, subtract and pass on a 17-bit accumulator.
//
// Random and corner accumulator/multiplicand values (including the most
// negative multiplicand) are checked against integer arithmetic done in the
// testbench: the multiplicand is taken as a signed 16-bit number and the
// result is compared modulo 2^17.
module tb_cbm_alu;
  import cbm_pkg::*;
  localparam int W = 16, AW = 17;

  logic [AW-1:0] acc, result;
  logic [W-1:0]  m;
  alu_op_e       op;
  int checks = 0, failures = 0;

  cbm_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [AW-1:0] ta, input logic [W-1:0] tm, input alu_op_e top);
    longint e;
    acc = ta; m = tm; op = top;
    #1;
    e = longint'($signed(ta));
    if (top == ALU_ADD) e = e + longint'($signed(tm));
    if (top == ALU_SUB) e = e - longint'($signed(tm));
    checks++;
    if (result != AW'(e)) begin
      failures++;
      $display("FAIL acc=%h m=%h op=%0d result=%h expected=%h", ta, tm, top, result, AW'(e));
    end
  endtask

  initial begin
    for (int o = 0; o < 3; o++) begin
      check(17'h00000, 16'h8000, alu_op_e'(o));
      check(17'h1FFFF, 16'h7FFF, alu_op_e'(o));
      check(17'h00000, 16'hFFFF, alu_op_e'(o));
      check(17'h0FFFF, 16'h0001, alu_op_e'(o));
    end
    for (int k = 0; k < 3000; k++)
      check(AW'($urandom), W'($urandom), alu_op_e'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
