// Testbench for cbm_top at sizes other than the default 16/4.
//
// Runs random multiplications through three instances, W/G = 8/2, 12/4 and
// 32/8, each driven by a cbm_param_check, and adds up their results. It
// shows that the width and group-width parameters give a working
// multiplier, not only the default configuration.
module tb_cbm_params;
  logic clk = 0, rst_n = 1, start = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  cbm_param_check #(.W(8),  .G(2)) u_w8  (.clk, .rst_n, .start, .count(2000), .checks(c0), .failures(f0), .finished(d0));
  cbm_param_check #(.W(12), .G(4)) u_w12 (.clk, .rst_n, .start, .count(2000), .checks(c1), .failures(f1), .finished(d1));
  cbm_param_check #(.W(32), .G(8)) u_w32 (.clk, .rst_n, .start, .count(2000), .checks(c2), .failures(f2), .finished(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    start = 1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
