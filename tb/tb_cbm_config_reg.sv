// Testbench for cbm_config_reg: range detection and iteration count.
//
// Drives directed operands (the four example operand pairs of the design's
// reference results, all-zero operands, one bit in every position) and
// random ones with random leading zero groups. The expected range is found
// by scanning down from the top bit for the first one, and the expected
// iteration count from that range and the multiplier bit below the range
// boundary. Also checks that range_q/iters_q only change on `load`.
module tb_cbm_config_reg;
  localparam int W = 16, G = 4;

  logic clk = 0, rst_n = 1, load = 0;
  logic [W-1:0] a = '0, b = '0;
  logic [1:0] range_a, range_b, range_d, range_q;
  logic [4:0] iters_d, iters_q;
  int checks = 0, failures = 0;

  cbm_config_reg dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_range(input logic [W-1:0] x);
    int top = -1;
    for (int i = W - 1; i >= 0; i--) if (x[i] && top < 0) top = i;
    return (top < 0) ? 0 : top / G;
  endfunction

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    int ra, rb, r, n, it;
    a = ta; b = tb_; load = 1;
    #1;
    ra = ref_range(ta); rb = ref_range(tb_);
    r  = (ra > rb) ? ra : rb;
    n  = (r + 1) * G;
    it = (n < W && ta[n-1]) ? n + 1 : n;
    checks++;
    if (range_a != 2'(ra) || range_b != 2'(rb) || range_d != 2'(r) || iters_d != 5'(it)) begin
      failures++;
      $display("FAIL a=%h b=%h ra=%0d/%0d rb=%0d/%0d r=%0d/%0d it=%0d/%0d",
               ta, tb_, range_a, ra, range_b, rb, range_d, r, iters_d, it);
    end
    @(posedge clk); #1;
    load = 0;
    checks++;
    if (range_q != 2'(r) || iters_q != 5'(it)) begin
      failures++;
      $display("FAIL registered a=%h b=%h range_q=%0d iters_q=%0d", ta, tb_, range_q, iters_q);
    end
    // Without load the register must hold.
    a = ~ta; b = ~tb_;
    @(posedge clk); #1;
    checks++;
    if (range_q != 2'(r) || iters_q != 5'(it)) begin
      failures++;
      $display("FAIL hold a=%h b=%h", ta, tb_);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    check(16'hA833, 16'h3540);   // range 16
    check(16'h0543, 16'h01FE);   // range 12
    check(16'h005F, 16'h003A);   // range 8
    check(16'h0006, 16'h0007);   // range 4
    check(16'h0000, 16'h0000);
    check(16'h000E, 16'h0009);   // positive multiplier, top in-range bit set
    for (int i = 0; i < W; i++) begin
      check(W'(1) << i, 16'h0001);
      check(16'h0001, W'(1) << i);
    end
    for (int k = 0; k < 300; k++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom) >> (G * ($urandom % 4));
      rb = W'($urandom) >> (G * ($urandom % 4));
      check(ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
