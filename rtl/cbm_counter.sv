// Iteration counter: the 4-bit binary counter that paces the controller.
//
// `load` presets the count to `init` (the number of iterations still to run
// after the current one, i.e. iterations - 1); every edge with `dec` high
// counts down by one. `zero` is high while the count is 0, which marks the
// last iteration. `load` wins over `dec`. Reset (rst_n low, asynchronous)
// clears the count. The 4-bit width is the paper's; counting down from a
// preset is this design's choice.
module cbm_counter #(
  parameter int CW = cbm_pkg::CBM_CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] init,
  input  logic          dec,
  output logic [CW-1:0] count,
  output logic          zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (load)   count <= init;
    else if (dec)    count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
