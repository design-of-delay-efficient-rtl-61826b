// Shared constants and types of the configurable Booth multiplier (CBM).
//
// The multiplier works on 16-bit two's-complement operands that are split
// into four 4-bit groups for range detection; these two numbers are the
// paper's. The range code is 2 bits: 00 = 4-bit, 01 = 8-bit, 10 = 12-bit,
// 11 = 16-bit, as in the paper's range-detection rule. The accumulator
// carries one guard bit above the operand width; that, and the encoding of
// the ALU operation, are this design's own choices.
package cbm_pkg;

  // Operand width and range-detection group width.
  localparam int CBM_W = 16;
  localparam int CBM_G = 4;

  // Width of the iteration counter (the paper's 4-bit counter).
  localparam int CBM_CW = $clog2(CBM_W);

  // Range codes for the default 16-bit, 4-bit-group configuration.
  typedef enum logic [1:0] {
    RANGE_4  = 2'b00,
    RANGE_8  = 2'b01,
    RANGE_12 = 2'b10,
    RANGE_16 = 2'b11
  } range_e;

  // Operation of the adder/subtractor in one Booth iteration.
  typedef enum logic [1:0] {
    ALU_NONE = 2'b00,   // PA[1:0] = 00 or 11: shift only
    ALU_ADD  = 2'b01,   // PA[1:0] = 01: add the multiplicand
    ALU_SUB  = 2'b10    // PA[1:0] = 10: subtract the multiplicand
  } alu_op_e;

  // Booth recoding of the two least significant bits of PA.
  function automatic alu_op_e booth_decode(input logic [1:0] pair);
    unique case (pair)
      2'b01:   return ALU_ADD;
      2'b10:   return ALU_SUB;
      default: return ALU_NONE;
    endcase
  endfunction

endpackage
