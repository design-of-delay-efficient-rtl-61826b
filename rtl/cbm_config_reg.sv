// Configuration register: registered range of the two operands.
//
// cbm_range_detect finds the range of each operand (the highest non-zero
// 4-bit group), the range of the multiplication (the larger of the two) and
// the number of Booth iterations it needs (4, 8, 12 or 16, or one more for
// a positive multiplier whose top in-range bit is one; see
// cbm_range_detect). The detection rule is the paper's; the extra
// iteration is this design's own.
//
// Interface: `a` is the multiplier, `b` the multiplicand. range_a, range_b,
// range_d and iters_d are combinational from a and b. On a clock edge with
// `load` high, range_q and iters_q capture range_d and iters_d; otherwise
// they hold. Reset (rst_n low, asynchronous) clears range_q to the smallest
// range and sets iters_q to G.
module cbm_config_reg #(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int G  = cbm_pkg::CBM_G,
  parameter int RW = ((W / G) > 1) ? $clog2(W / G) : 1,
  parameter int IW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [RW-1:0] range_a,
  output logic [RW-1:0] range_b,
  output logic [RW-1:0] range_d,
  output logic [IW-1:0] iters_d,
  output logic [RW-1:0] range_q,
  output logic [IW-1:0] iters_q
);

  cbm_range_detect #(.W(W), .G(G), .RW(RW), .IW(IW)) u_detect (
    .a, .b, .range_a, .range_b, .range_ab(range_d), .iters(iters_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q <= '0;
      iters_q <= IW'(G);
    end else if (load) begin
      range_q <= range_d;
      iters_q <= iters_d;
    end
  end

endmodule
