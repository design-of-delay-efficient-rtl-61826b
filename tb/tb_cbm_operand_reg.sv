// Testbench for cbm_operand_reg: reset value, load and hold.
//
// After reset both outputs must be zero. Random operands are then offered
// with `load` randomly high or low; a scoreboard copy of the expected
// register contents is updated only when `load` is high and compared after
// every edge.
module tb_cbm_operand_reg;
  localparam int W = 16;

  logic clk = 0, rst_n = 1, load = 0;
  logic [W-1:0] a = '0, b = '0, a_q, b_q;
  logic [W-1:0] ea = '0, eb = '0;
  int checks = 0, failures = 0;

  cbm_operand_reg dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (a_q != '0 || b_q != '0) begin failures++; $display("FAIL reset"); end
    #10 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      a = W'($urandom); b = W'($urandom); load = 1'($urandom);
      if (load) begin ea = a; eb = b; end
      @(posedge clk); #1;
      checks++;
      if (a_q != ea || b_q != eb) begin
        failures++;
        $display("FAIL k=%0d a_q=%h/%h b_q=%h/%h", k, a_q, ea, b_q, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
