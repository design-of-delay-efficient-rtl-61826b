// Combinational configurable Booth multiplier.
//
// The same algorithm as the clocked multiplier, unrolled: W stages of
// cbm_booth_stage in a chain, each one Booth iteration. cbm_range_detect
// gives the iteration count for the operands (4, 8, 12 or 16, or one more
// for a positive multiplier whose top in-range bit is one); the first
// `iters` stages work and the rest pass PA on unchanged. The arithmetic
// shifter then reads the product out of the last PA, shifting it down by
// W - iters places.
//
// Interface: `a` is the multiplier and `b` the multiplicand (W-bit two's
// complement), `p` = a * b (2W bits). `range_ab` and `iters` report the
// detected range and the number of active stages. There is no clock: the
// outputs follow the inputs after the combinational delay of the chain.
//
// The paper says its multiplier is built as combinational logic; this
// module is that form. The stage chain, the bypass of unused stages and the
// read-out alignment are this design's own realisation.
module cbm_comb #(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int G  = cbm_pkg::CBM_G,
  localparam int RW = ((W / G) > 1) ? $clog2(W / G) : 1,
  localparam int IW = $clog2(W + 1)
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p,
  output logic [RW-1:0]  range_ab,
  output logic [IW-1:0]  iters
);

  localparam int PW = 2 * W + 2;

  logic [RW-1:0] range_a, range_b;
  logic [PW-1:0] pa [W+1];

  cbm_range_detect #(.W(W), .G(G), .RW(RW), .IW(IW)) u_detect (
    .a, .b, .range_a, .range_b, .range_ab, .iters
  );

  assign pa[0] = {{(PW-W-1){1'b0}}, a, 1'b0};

  for (genvar i = 0; i < W; i++) begin : g_stage
    cbm_booth_stage #(.W(W), .PW(PW)) u_stage (
      .en(i < int'(iters)), .pa_in(pa[i]), .m(b), .pa_out(pa[i+1])
    );
  end

  cbm_shifter #(.W(W), .PW(PW), .IW(IW)) u_align (
    .pa_step('0), .pa(pa[W]), .iters, .pa_shr(), .product(p)
  );

endmodule
