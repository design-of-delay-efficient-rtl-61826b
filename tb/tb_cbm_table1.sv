// Reference-result testbench for cbm_top: the four published operand pairs.
//
// One multiplication per range (16, 12, 8 and 4 bits) on the clocked
// multiplier at its default size, and the same operands on its
// combinational form. Each product is compared bit for bit with the
// published 32-bit result, the range code with the published range
// (11, 10, 01, 00), and the clocked run's length with the range: 16, 12, 8
// or 4 iterations, i.e. 18, 14, 10 or 6 clock edges from `go` to `done`.
// For the 16-bit pair the final PA register is compared with its published
// 33-bit value too.
module tb_cbm_table1;
  localparam int W = 16;

  logic clk = 0, rst_n = 1, go = 0;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] p;
  logic [1:0] range_a, range_b, range_q;
  logic [4:0] iters;
  logic idle, done;
  logic [W-1:0] comb_a = '0, comb_b = '0;
  logic [2*W-1:0] comb_p;
  logic [1:0] comb_range;
  logic [4:0] comb_iters;
  int checks = 0, failures = 0;

  cbm_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic row(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                     input logic [2*W-1:0] ep, input logic [1:0] er, input int bits);
    int cyc;
    @(negedge clk);
    a = ta; b = tb_; go = 1; comb_a = ta; comb_b = tb_;
    @(negedge clk);
    go = 0;
    cyc = 1;
    while (!done && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (p != ep || range_q != er || cyc != bits + 2) begin
      failures++;
      $display("FAIL clocked a=%b b=%b p=%b range=%b cycles=%0d", ta, tb_, p, range_q, cyc);
    end
    checks++;
    if (comb_p != ep || comb_range != er || int'(comb_iters) != bits) begin
      failures++;
      $display("FAIL combinational a=%b b=%b p=%b range=%b", ta, tb_, comb_p, comb_range);
    end
    $display("a=%b b=%b p=%b (%0d) range=%b cycles=%0d", ta, tb_, p, $signed(p), range_q, cyc);
  endtask

  // After a full 16-iteration run the low 33 bits of PA are the product
  // above the multiplier's last-scanned bit, A[15], as published for the
  // first pair.
  task automatic check_pa(input logic [32:0] epa);
    checks++;
    if (dut.u_acc.pa[32:0] != epa) begin
      failures++;
      $display("FAIL PA=%b expected %b", dut.u_acc.pa[32:0], epa);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    row(16'b1010_1000_0011_0011, 16'b0011_0101_0100_0000,
        32'b11101101101111001_001101111000000, cbm_pkg::RANGE_16, 16);
    check_pa(33'b111011011011110010011011110000001);
    row(16'b0000_0101_0100_0011, 16'b0000_0001_1111_1110,
        32'b00000000000010100_111101101111010, cbm_pkg::RANGE_12, 12);
    row(16'b0000_0000_0101_1111, 16'b0000_0000_0011_1010,
        32'b00000000000000000_001010110000110, cbm_pkg::RANGE_8, 8);
    row(16'b0000_0000_0000_0110, 16'b0000_0000_0000_0111,
        32'b00000000000000000_000000000101010, cbm_pkg::RANGE_4, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
