// Configurable Booth multiplier (CBM), 4/8/12/16-bit, signed.
//
// A radix-2 Booth multiplier that runs only as many iterations as the
// operands need. A `go` pulse captures the multiplier `a` and the
// multiplicand `b` (both W-bit two's complement) in the operand registers.
// The configuration register then finds the range of each operand (the
// highest non-zero 4-bit group), takes the larger, and sets the iteration
// count to 4, 8, 12 or 16. The controller runs that many Booth iterations
// on PA = {accumulator, multiplier, extra LSB}: each one looks at PA[1:0],
// adds (01) or subtracts (10) the multiplicand to the accumulator half or
// leaves it (00, 11), and shifts PA right arithmetically by one place. The
// arithmetic shifter finally aligns the product `p` (2W bits).
//
// Timing: the edge that samples `go` (while `idle`) loads the operands; the
// next edge loads the range, PA and counter; then one edge per iteration.
// `done` is high for one cycle after the last iteration, and `p`, `range`
// and `iters` stay valid until the next `go`. A multiplication in the
// 4/8/12/16-bit range takes 6/10/14/18 edges from `go` to `done`, plus one
// when the extra iteration described in cbm_config_reg is needed.
//
// The module also holds cbm_comb, the purely combinational form of the
// same multiplier (the paper presents its multiplier as combinational
// logic while drawing the clocked datapath above); it has its own comb_*
// ports and shares nothing with the clocked path.
//
// Following the paper: the range-detection rule, PA and its Booth
// recoding, a single arithmetic shift per iteration, the 4-bit counter and
// the Go/idle handshake. This design's own: the guard bit of the
// accumulator, the extra iteration for positive multipliers whose top
// in-range bit is one, the product alignment, and the load sequencing.
module cbm_top
  import cbm_pkg::*;
#(
  parameter int W   = cbm_pkg::CBM_W,
  parameter int G   = cbm_pkg::CBM_G,
  localparam int RW = ((W / G) > 1) ? $clog2(W / G) : 1,
  localparam int IW = $clog2(W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [W-1:0]   a,        // multiplier
  input  logic [W-1:0]   b,        // multiplicand
  output logic [2*W-1:0] p,        // product a * b
  output logic [RW-1:0]  range_a,  // range of the held multiplier
  output logic [RW-1:0]  range_b,  // range of the held multiplicand
  output logic [RW-1:0]  range_q,  // range used by the last run
  output logic [IW-1:0]  iters,    // iterations of the last run
  output logic           idle,
  output logic           done,
  // Combinational form of the same multiplier, side by side.
  input  logic [W-1:0]   comb_a,      // multiplier
  input  logic [W-1:0]   comb_b,      // multiplicand
  output logic [2*W-1:0] comb_p,      // product comb_a * comb_b
  output logic [RW-1:0]  comb_range,  // detected range
  output logic [IW-1:0]  comb_iters   // active Booth stages
);

  localparam int CW  = $clog2(W);
  localparam int AW  = W + 1;
  localparam int PW  = AW + W + 1;

  logic          op_load, cfg_load, pa_load, cnt_load, step;
  alu_op_e       alu_op;
  logic          cnt_zero;
  logic [CW-1:0] cnt;      // count itself is only used through cnt_zero
  logic [W-1:0]  a_q, b_q;
  logic [RW-1:0] range_d;
  logic [IW-1:0] iters_d;
  logic [PW-1:0] pa, pa_sum, pa_next;
  logic [AW-1:0] acc_sum;

  cbm_operand_reg #(.W(W)) u_opreg (
    .clk, .rst_n, .load(op_load), .a, .b, .a_q, .b_q
  );

  cbm_config_reg #(.W(W), .G(G), .RW(RW), .IW(IW)) u_cfg (
    .clk, .rst_n, .load(cfg_load), .a(a_q), .b(b_q),
    .range_a, .range_b, .range_d, .iters_d,
    .range_q, .iters_q(iters)
  );

  cbm_counter #(.CW(CW)) u_cnt (
    .clk, .rst_n, .load(cnt_load), .init(CW'(iters_d - 1'b1)),
    .dec(step), .count(cnt), .zero(cnt_zero)
  );

  cbm_controller u_ctrl (
    .clk, .rst_n, .go, .pa_lsbs(pa[1:0]), .cnt_zero,
    .op_load, .cfg_load, .pa_load, .cnt_load, .step, .alu_op, .idle, .done
  );

  cbm_alu #(.W(W), .AW(AW)) u_alu (
    .acc(pa[PW-1 -: AW]), .m(b_q), .op(alu_op), .result(acc_sum)
  );

  assign pa_sum = {acc_sum, pa[W:0]};

  cbm_shifter #(.W(W), .PW(PW), .IW(IW)) u_shift (
    .pa_step(pa_sum), .pa, .iters, .pa_shr(pa_next), .product(p)
  );

  cbm_accumulator #(.W(W), .PW(PW)) u_acc (
    .clk, .rst_n, .load(pa_load), .mult(a_q), .update(step),
    .pa_next, .pa
  );

  cbm_comb #(.W(W), .G(G)) u_comb (
    .a(comb_a), .b(comb_b), .p(comb_p), .range_ab(comb_range), .iters(comb_iters)
  );

endmodule
