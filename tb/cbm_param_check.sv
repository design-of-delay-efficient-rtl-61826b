// Checker used by tb_cbm_params: one cbm_top at width W, group width G.
//
// Waits for `start`, then runs `count` multiplications of random operands
// with randomly cleared leading groups through the clocked form, and
// applies the same operands to the combinational form. Each product is
// compared with a signed multiplication done here, and each run's length
// with the range (iterations + 2 edges, one more for the extra
// iteration). Counts its checks and failures and raises `finished`.
module cbm_param_check #(
  parameter int W = 8,
  parameter int G = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  int   count,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int RW = ((W / G) > 1) ? $clog2(W / G) : 1;
  localparam int IW = $clog2(W + 1);

  logic go = 0;
  logic [W-1:0] a = '0, b = '0, comb_a = '0, comb_b = '0;
  logic [2*W-1:0] p, comb_p;
  logic [RW-1:0] range_a, range_b, range_q, comb_range;
  logic [IW-1:0] iters, comb_iters;
  logic idle, done;

  cbm_top #(.W(W), .G(G)) dut (.*);

  function automatic int ref_range(input logic [W-1:0] x);
    int top = -1;
    for (int i = W - 1; i >= 0; i--) if (x[i] && top < 0) top = i;
    return (top < 0) ? 0 : top / G;
  endfunction

  initial begin
    checks = 0; failures = 0; finished = 0;
    wait (start);
    for (int k = 0; k < count; k++) begin
      logic [W-1:0] ta, tb_;
      longint e;
      int r, n, cyc;
      ta  = W'({$urandom, $urandom}) >> (G * ($urandom % (W / G)));
      tb_ = W'({$urandom, $urandom}) >> (G * ($urandom % (W / G)));
      @(negedge clk);
      a = ta; b = tb_; comb_a = ta; comb_b = tb_; go = 1;
      @(negedge clk);
      go = 0;
      cyc = 1;
      while (!done && cyc < 4 * W) begin
        @(negedge clk);
        cyc++;
      end
      e = longint'($signed(ta)) * longint'($signed(tb_));
      r = (ref_range(ta) > ref_range(tb_)) ? ref_range(ta) : ref_range(tb_);
      n = (r + 1) * G;
      if (n < W && ta[n-1]) n++;
      checks++;
      if (p != (2*W)'(e) || int'(range_q) != r || cyc != n + 2) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h p=%0d expected=%0d range=%0d/%0d cycles=%0d/%0d",
                 W, ta, tb_, $signed(p), e, range_q, r, cyc, n + 2);
      end
      checks++;
      if (comb_p != (2*W)'(e) || int'(comb_iters) != n) begin
        failures++;
        $display("FAIL W=%0d combinational a=%h b=%h p=%0d", W, ta, tb_, $signed(comb_p));
      end
    end
    finished = 1;
  end
endmodule
