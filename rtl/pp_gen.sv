// pp_gen: partial-product generator of the 4x4 multiplier.
//
// Sixteen two-input AND gates form every bit product a[i] & b[j]; the result
// pp[j][i] carries weight 2**(i+j), so column k of the multiplier array adds
// all pp[j][i] with i + j = k. This is the row of AND gates that heads the
// array in both the conventional and the CBL multiplier.
//
// Interface: a, b 4-bit operands; pp the 4x4 matrix (row j = b[j] times a).
// Combinational, one AND-gate delay, no clock.
module pp_gen
  import cbl_pkg::*;
(
  input  operand_t   a,
  input  operand_t   b,
  output pp_matrix_t pp
);

  for (genvar j = 0; j < OPERAND_W; j++) begin : g_row
    for (genvar i = 0; i < OPERAND_W; i++) begin : g_col
      assign pp[j][i] = a[i] & b[j];
    end
  end

endmodule
