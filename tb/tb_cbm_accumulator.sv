// Testbench for cbm_accumulator: PA reset, load layout, update and hold.
//
// Checks that reset clears PA, that `load` gives {17'b0, multiplier, 1'b0},
// that `update` takes pa_next, that `load` wins over `update`, and that PA
// holds when neither is high, against a scoreboard copy.
module tb_cbm_accumulator;
  localparam int W = 16, PW = 34;

  logic clk = 0, rst_n = 1, load = 0, update = 0;
  logic [W-1:0]  mult = '0;
  logic [PW-1:0] pa_next = '0, pa, e = '0;
  int checks = 0, failures = 0;

  cbm_accumulator dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (pa != '0) begin failures++; $display("FAIL reset"); end
    #10 rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      mult = W'($urandom); pa_next = {$urandom, $urandom};
      load = ($urandom % 4) == 0; update = 1'($urandom);
      if (load)        e = {17'b0, mult, 1'b0};
      else if (update) e = pa_next;
      @(posedge clk); #1;
      checks++;
      if (pa != e) begin
        failures++;
        $display("FAIL k=%0d load=%0b update=%0b pa=%h exp=%h", k, load, update, pa, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
