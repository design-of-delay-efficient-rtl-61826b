// Operand registers: the two W-bit input registers of the multiplier.
//
// On a clock edge with `load` high, a_q and b_q capture a and b; otherwise
// they hold. Reset (rst_n low, asynchronous) clears both. `a` is the
// multiplier and `b` the multiplicand. The two 16-bit registers are the
// paper's; the load enable and the reset value are this design's choice.
module cbm_operand_reg #(
  parameter int W = cbm_pkg::CBM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] a_q,
  output logic [W-1:0] b_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a;
      b_q <= b;
    end
  end

endmodule
