// Accumulator: the PA register of the Booth datapath.
//
// PA = {accumulator (W+1 bits), multiplier (W bits), extra LSB}. On an edge
// with `load` high, PA takes {0, mult, 0}: a cleared accumulator, the
// multiplier, and a zero below it as the "previous" bit of the first Booth
// step. On an edge with `update` high, PA takes `pa_next`, the shifted
// result of one iteration. `load` wins over `update`. Reset (rst_n low,
// asynchronous) clears PA.
//
// The layout and the initial value follow the paper's register PA; the
// guard bit on the accumulator is this design's choice (see cbm_alu).
module cbm_accumulator #(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int PW = 2 * W + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [W-1:0]  mult,
  input  logic          update,
  input  logic [PW-1:0] pa_next,
  output logic [PW-1:0] pa
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pa <= '0;
    else if (load)   pa <= {{(PW-W-1){1'b0}}, mult, 1'b0};
    else if (update) pa <= pa_next;
  end

endmodule
