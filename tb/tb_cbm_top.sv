// End-to-end testbench for cbm_top at its default 16-bit size.
//
// Runs the four reference operand pairs (one per range: 16, 12, 8 and
// 4 bits, with their known decimal products), the corner cases (zeros, the
// most negative numbers, positive multipliers whose top in-range bit is
// one) and random operands whose leading 4-bit groups are randomly cleared.
// For each multiplication it checks the product against the testbench's
// own signed multiplication, the detected range against a bit scan, and the
// number of clock edges from `go` to `done` (range bits + 2, plus one for
// the extra iteration). It also starts a run while one is in progress
// (must be ignored) and counts how often each mechanism happened: every
// range, add, subtract and shift-only steps, the extra iteration, and an
// ignored `go`; a mechanism that never happened counts as a failure. The
// same operands are applied to the combinational form (comb_* ports),
// whose product, range and active-stage count are checked alike.
module tb_cbm_top;
  localparam int W = 16, G = 4;

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
  int n_range[4];
  int n_add = 0, n_sub = 0, n_none = 0, n_extra = 0, n_ignored = 0;

  cbm_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the Booth actions as they happen.
  always @(posedge clk) if (!idle && dut.u_ctrl.step) begin
    case (dut.alu_op)
      cbm_pkg::ALU_ADD: n_add++;
      cbm_pkg::ALU_SUB: n_sub++;
      default:          n_none++;
    endcase
  end

  function automatic int ref_range(input logic [W-1:0] x);
    int top = -1;
    for (int i = W - 1; i >= 0; i--) if (x[i] && top < 0) top = i;
    return (top < 0) ? 0 : top / G;
  endfunction

  task automatic multiply(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                          input bit poke_go, input bit have_dec, input longint dec);
    longint e;
    int r, n, cyc;
    bit extra;
    @(negedge clk);
    a = ta; b = tb_; go = 1;
    comb_a = ta; comb_b = tb_;
    @(negedge clk);
    go = 0;
    a = ~ta; b = ~tb_;               // inputs may change once captured
    cyc = 1;
    while (!done) begin
      if (poke_go && cyc == 3) begin
        go = 1;
        n_ignored++;
      end else go = 0;
      @(negedge clk);
      cyc++;
      if (cyc > 40) break;
    end
    go = 0;
    e = longint'($signed(ta)) * longint'($signed(tb_));
    r = (ref_range(ta) > ref_range(tb_)) ? ref_range(ta) : ref_range(tb_);
    n = (r + 1) * G;
    extra = (n < W) && ta[n-1];
    if (extra) n_extra++;
    n_range[r]++;
    checks++;
    if (p != 32'(e)) begin
      failures++;
      $display("FAIL a=%h b=%h p=%0d expected=%0d", ta, tb_, $signed(p), e);
    end
    checks++;
    if (have_dec && e != dec) begin
      failures++;
      $display("FAIL reference product %0d != %0d", e, dec);
    end
    checks++;
    if (range_q != 2'(r) || range_a != 2'(ref_range(ta)) || range_b != 2'(ref_range(tb_))) begin
      failures++;
      $display("FAIL range a=%h b=%h range=%0d expected=%0d", ta, tb_, range_q, r);
    end
    checks++;
    if (cyc != n + int'(extra) + 2 || int'(iters) != n + int'(extra)) begin
      failures++;
      $display("FAIL cycles a=%h b=%h cycles=%0d iters=%0d expected %0d", ta, tb_, cyc, iters,
               n + int'(extra) + 2);
    end
    // The combinational form must agree.
    checks++;
    if (comb_p != 32'(e) || comb_range != 2'(r) || int'(comb_iters) != n + int'(extra)) begin
      failures++;
      $display("FAIL combinational a=%h b=%h p=%0d range=%0d iters=%0d", ta, tb_,
               $signed(comb_p), comb_range, comb_iters);
    end
    // Product must stay valid while idle.
    @(negedge clk);
    checks++;
    if (!idle || p != 32'(e)) begin failures++; $display("FAIL hold a=%h b=%h", ta, tb_); end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    // Reference operands and products, one per range.
    multiply(16'b1010_1000_0011_0011, 16'b0011_0101_0100_0000, 0, 1, -64'sd306406464);
    multiply(16'b0000_0101_0100_0011, 16'b0000_0001_1111_1110, 0, 1, 64'sd686970);
    multiply(16'b0000_0000_0101_1111, 16'b0000_0000_0011_1010, 0, 1, 64'sd5510);
    multiply(16'b0000_0000_0000_0110, 16'b0000_0000_0000_0111, 0, 1, 64'sd42);
    // Corners.
    multiply(16'h0000, 16'h0000, 0, 0, 0);
    multiply(16'h8000, 16'h8000, 0, 0, 0);
    multiply(16'h7FFF, 16'h8000, 0, 0, 0);
    multiply(16'h8000, 16'h7FFF, 0, 0, 0);
    multiply(16'hFFFF, 16'hFFFF, 0, 0, 0);
    multiply(16'h000E, 16'h0009, 0, 0, 0);   // 14 * 9 in the 4-bit range
    multiply(16'h0F00, 16'h0003, 0, 0, 0);
    multiply(16'h00FF, 16'hFFFF, 0, 0, 0);
    multiply(16'h0123, 16'h0045, 1, 0, 0);   // go pulsed while busy
    for (int k = 0; k < 2000; k++) begin
      logic [W-1:0] ra, rb;
      ra = W'($urandom) >> (G * ($urandom % 4));
      rb = W'($urandom) >> (G * ($urandom % 4));
      multiply(ra, rb, (k % 97) == 0, 0, 0);
    end
    $display("ranges 4/8/12/16: %0d %0d %0d %0d; add %0d sub %0d shift-only %0d; extra %0d; ignored go %0d",
             n_range[0], n_range[1], n_range[2], n_range[3], n_add, n_sub, n_none, n_extra, n_ignored);
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_range[r] == 0) begin failures++; $display("FAIL range %0d never used", r); end
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_none == 0 || n_extra == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
