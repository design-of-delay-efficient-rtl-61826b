// Arithmetic shifter of the Booth datapath.
//
// PA is {accumulator (W+1 bits), multiplier (W bits), extra LSB}, PW bits in
// all. The shifter has two jobs:
//   * pa_shr = pa_step (PA with the ALU result in its accumulator half)
//     shifted right by one place with the sign bit repeated:
//     the single arithmetic right shift that ends every Booth iteration.
//     The bits leaving the accumulator move into the multiplier field.
//   * product = the 2W-bit result read out of the held PA, `pa`, after `iters` iterations.
//     After a full run (iters = W) the product is PA[2W:1]. A shortened run
//     leaves it W - iters places higher, with the unused multiplier bits
//     below it, so it is shifted down arithmetically by W - iters places.
// Purely combinational.
//
// The one-place arithmetic shift on every iteration is the paper's; the
// read-out alignment follows from its idea of running fewer iterations and
// is this design's realisation of it.
module cbm_shifter #(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int PW = 2 * W + 2,
  parameter int IW = $clog2(W + 1)
) (
  input  logic [PW-1:0]  pa_step,
  input  logic [PW-1:0]  pa,
  input  logic [IW-1:0]  iters,
  output logic [PW-1:0]  pa_shr,
  output logic [2*W-1:0] product
);

  logic signed [PW-2:0] field;
  logic signed [PW-2:0] aligned;

  always_comb begin
    pa_shr  = {pa_step[PW-1], pa_step[PW-1:1]};
    field   = signed'(pa[PW-1:1]);
    aligned = field >>> (W - int'(iters));
    product = aligned[2*W-1:0];
  end

endmodule
