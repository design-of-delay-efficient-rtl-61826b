// Adder/subtractor (the ALU of the Booth datapath).
//
// Computes acc + m, acc - m or acc, where `acc` is the accumulator half of
// PA (AW = W + 1 bits, two's complement) and `m` is the W-bit multiplicand,
// sign-extended to AW bits. The operation comes from the controller's Booth
// recoding of PA[1:0]. Purely combinational.
//
// Add, subtract and pass are the paper's three actions. The accumulator
// is one bit wider than the operands, which is this design's choice: with a
// W-bit accumulator, subtracting the most negative multiplicand (-2^(W-1))
// would overflow.
module cbm_alu
  import cbm_pkg::*;
#(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int AW = W + 1
) (
  input  logic [AW-1:0] acc,
  input  logic [W-1:0]  m,
  input  alu_op_e       op,
  output logic [AW-1:0] result
);

  logic [AW-1:0] m_ext;

  always_comb begin
    m_ext = {{(AW-W){m[W-1]}}, m};
    unique case (op)
      ALU_ADD: result = acc + m_ext;
      ALU_SUB: result = acc - m_ext;
      default: result = acc;
    endcase
  end

endmodule
