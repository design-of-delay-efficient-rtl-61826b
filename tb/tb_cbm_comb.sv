// Testbench for cbm_comb: the combinational configurable Booth multiplier.
//
// Applies the four reference operand pairs (ranges 16, 12, 8 and 4 bits),
// corner cases (zeros, the most negative numbers, positive multipliers
// whose top in-range bit is one) and random operands with randomly cleared
// leading 4-bit groups. Each product is compared with the testbench's own
// signed multiplication, the range with a bit scan, and the number of
// active stages with the range (plus one for the extra iteration).
module tb_cbm_comb;
  localparam int W = 16, G = 4;

  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  logic [1:0] range_ab;
  logic [4:0] iters;
  int checks = 0, failures = 0;
  int n_range[4];

  cbm_comb dut (.*);

  initial begin
    #1000000;
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
    longint e;
    int r, n;
    a = ta; b = tb_;
    #1;
    e = longint'($signed(ta)) * longint'($signed(tb_));
    r = (ref_range(ta) > ref_range(tb_)) ? ref_range(ta) : ref_range(tb_);
    n = (r + 1) * G;
    if (n < W && ta[n-1]) n++;
    n_range[r]++;
    checks++;
    if (p != 32'(e) || range_ab != 2'(r) || int'(iters) != n) begin
      failures++;
      $display("FAIL a=%h b=%h p=%0d expected=%0d range=%0d/%0d iters=%0d/%0d",
               ta, tb_, $signed(p), e, range_ab, r, iters, n);
    end
  endtask

  initial begin
    check(16'b1010_1000_0011_0011, 16'b0011_0101_0100_0000);
    check(16'b0000_0101_0100_0011, 16'b0000_0001_1111_1110);
    check(16'b0000_0000_0101_1111, 16'b0000_0000_0011_1010);
    check(16'b0000_0000_0000_0110, 16'b0000_0000_0000_0111);
    check(16'h0000, 16'h0000);
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h8000);
    check(16'hFFFF, 16'h8000);
    check(16'h000E, 16'h0009);
    check(16'h0080, 16'h0081);
    check(16'h0800, 16'hF800);
    for (int k = 0; k < 5000; k++)
      check(W'($urandom) >> (G * ($urandom % 4)), W'($urandom) >> (G * ($urandom % 4)));
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_range[r] == 0) begin failures++; $display("FAIL range %0d never used", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
