// cbl_pkg: sizes and types shared by the 4x4 common-Boolean-logic multiplier.
//
// The multiplier is a fixed 4-bit by 4-bit unsigned array, so the operand and
// product widths are constants rather than module parameters: the reduction
// network in cbl_multiplier is wired cell by cell for these widths and does
// not generalise by changing a number. Both widths are the ones the design is
// published at (inputs A0..A3 and B0..B3, outputs S0..S7).
package cbl_pkg;

  localparam int unsigned OPERAND_W = 4;
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;

  // Partial-product matrix: pp[j][i] = a[i] & b[j], weight 2**(i+j).
  typedef logic [OPERAND_W-1:0][OPERAND_W-1:0] pp_matrix_t;

endpackage
