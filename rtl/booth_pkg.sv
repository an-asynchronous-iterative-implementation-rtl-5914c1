// booth_pkg: types and constants shared by the original-Booth multipliers.
//
// The original (radix-2, variable-shift) Booth algorithm replaces every run of
// equal multiplier bits by one operation at each run boundary ("discontinuity"):
// a 0->1 boundary (scanning from the LSB) subtracts the multiplicand, a 1->0
// boundary adds it. booth_op_e names the operation the scan circuit asks for in
// one iteration. The 16-bit default operand width is the width of the
// implemented designs; the encoding of booth_op_e is this design's own choice.
package booth_pkg;

  // Operand width of the multipliers (16 x 16 bit designs).
  localparam int unsigned N_DEFAULT = 16;

  typedef enum logic [1:0] {
    OP_NONE = 2'b00,  // no discontinuity at the current bit: add zero
    OP_ADD  = 2'b01,  // add the multiplicand
    OP_SUB  = 2'b10   // subtract the multiplicand
  } booth_op_e;

endpackage
