// Testbench for cbm_controller: the IDLE -> LOAD -> RUN -> IDLE sequence.
//
// The testbench plays the counter itself: after each LOAD it picks a random
// iteration count and raises cnt_zero on the last RUN cycle. It checks, cycle
// by cycle, which control lines are high, that alu_op is the Booth recoding
// of random PA[1:0] values (01 add, 10 subtract, 00/11 none), that `done`
// pulses once right after the last iteration, that the run lasts exactly
// the chosen number of cycles, and that `go` is ignored while busy.
module tb_cbm_controller;
  import cbm_pkg::*;

  logic clk = 0, rst_n = 1, go = 0, cnt_zero = 0;
  logic [1:0] pa_lsbs = '0;
  logic op_load, cfg_load, pa_load, cnt_load, step, idle, done;
  alu_op_e alu_op;
  int checks = 0, failures = 0;

  cbm_controller dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_lines(input string what, input logic [6:0] e);
    checks++;
    if ({op_load, cfg_load, pa_load, cnt_load, step, idle, done} != e) begin
      failures++;
      $display("FAIL %s lines=%b expected=%b", what,
               {op_load, cfg_load, pa_load, cnt_load, step, idle, done}, e);
    end
  endtask

  initial begin
    int n;
    alu_op_e e;
    #1 rst_n = 0;
    #11 rst_n = 1;
    @(negedge clk);
    expect_lines("idle", 7'b0000010);
    for (int k = 0; k < 200; k++) begin
      n = 1 + ($urandom % 16);
      @(negedge clk); go = 1; #1;
      expect_lines("go", 7'b1000010);
      @(negedge clk); go = ($urandom % 2);   // go while busy must be ignored
      expect_lines("load", 7'b0111000);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        go = ($urandom % 2);
        pa_lsbs = 2'($urandom);
        cnt_zero = (i == n - 1);
        #1;
        expect_lines("run", 7'b0000100);
        e = (pa_lsbs == 2'b01) ? ALU_ADD : (pa_lsbs == 2'b10) ? ALU_SUB : ALU_NONE;
        checks++;
        if (alu_op != e) begin
          failures++;
          $display("FAIL decode pa=%b op=%0d", pa_lsbs, alu_op);
        end
      end
      @(negedge clk); cnt_zero = 0; go = 0; #1;
      expect_lines("done", 7'b0000011);
      @(negedge clk); #1;
      expect_lines("idle after", 7'b0000010);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
