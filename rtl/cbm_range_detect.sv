// Range detection of the configurable Booth multiplier (combinational).
//
// Each W-bit operand is cut into W/G groups of G bits. The range of an
// operand is the index of its most significant group that holds a one
// (for W = 16, G = 4: 11 if A[15:12] is non-zero, else 10 if A[11:8] is,
// else 01 if A[7:4] is, else 00); an all-zero operand gets range 00. The
// range of the multiplication is the larger of the two. This rule is the
// paper's.
//
// iters = (range + 1) * G is the number of Booth iterations the range asks
// for, plus one when that is below W and the multiplier `a` has a one in
// its top in-range bit, a[(range + 1) * G - 1]. Range detection looks only
// at bit patterns, so such a positive multiplier would otherwise be read
// as negative by the shortened Booth recoding (0x000E in the 4-bit range
// would count as -2). That extra iteration is this design's own addition;
// it keeps every product exact.
module cbm_range_detect #(
  parameter int W  = cbm_pkg::CBM_W,
  parameter int G  = cbm_pkg::CBM_G,
  parameter int RW = ((W / G) > 1) ? $clog2(W / G) : 1,
  parameter int IW = $clog2(W + 1)
) (
  input  logic [W-1:0]  a,        // multiplier
  input  logic [W-1:0]  b,        // multiplicand
  output logic [RW-1:0] range_a,
  output logic [RW-1:0] range_b,
  output logic [RW-1:0] range_ab,
  output logic [IW-1:0] iters
);

  localparam int NG = W / G;

  // Index of the most significant non-zero G-bit group; 0 if none.
  function automatic logic [RW-1:0] detect(input logic [W-1:0] x);
    logic [RW-1:0] r;
    r = '0;
    for (int g = 0; g < NG; g++) begin
      if (|x[g*G +: G]) r = RW'(g);
    end
    return r;
  endfunction

  // Iterations the range asks for: (range + 1) * G.
  logic [IW-1:0] n;

  always_comb begin
    range_a  = detect(a);
    range_b  = detect(b);
    range_ab = (range_a > range_b) ? range_a : range_b;
    n        = IW'((int'(range_ab) + 1) * G);
    if (int'(n) < W && a[$clog2(W)'(n - 1'b1)]) iters = n + 1'b1;
    else                                  iters = n;
  end

endmodule
