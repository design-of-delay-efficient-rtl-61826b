// Testbench for cbm_counter: preset, count down, zero flag, load priority.
//
// Presets the counter to every value 0..15, counts down to zero and checks
// the count and the zero flag on every edge against a model kept in the
// testbench; then checks that `load` wins over `dec` and that the count
// holds when neither is high.
module tb_cbm_counter;
  localparam int CW = 4;

  logic clk = 0, rst_n = 1, load = 0, dec = 0, zero;
  logic [CW-1:0] init = '0, count;
  int model;
  int checks = 0, failures = 0;

  cbm_counter dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_count(input int v);
    checks++;
    if (int'(count) != v || zero != (v == 0)) begin
      failures++;
      $display("FAIL count=%0d zero=%0b expected %0d", count, zero, v);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    expect_count(0);
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); load = 1; init = CW'(v); dec = 1;
      @(posedge clk); #1; load = 0;
      expect_count(v);
      model = v;
      while (model > 0) begin
        @(posedge clk); #1;
        model--;
        expect_count(model);
      end
      dec = 0;
      @(posedge clk); #1;
      expect_count(0);
    end
    @(negedge clk); load = 1; init = 4'd9; dec = 0;
    @(posedge clk); #1; load = 0;
    repeat (3) begin @(posedge clk); #1; expect_count(9); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
