// cbl_multiplier: 4x4 unsigned array multiplier whose full adders are
// common-Boolean-logic (CBL) carry-select cells.
//
// Structure. pp_gen forms the sixteen bit products AiBj (weight 2**(i+j)).
// They are summed column by column by the classic 4x4 array: four half
// adders where a column has two bits left, and eight adders of three bits.
// Those eight are cbl_full_adder cells: each derives its carry-in-0 and
// carry-in-1 results from one XOR, one NOT, one AND and one OR, and lets the
// previous carry choose between them through two multiplexers. The cell list,
// by column k (product bit k):
//   k=0  p0 = A0B0
//   k=1  HA1 (A0B1, A1B0)                    -> p1, C1
//   k=2  HA2 (A1B1, A0B2);  FA2 (A2B0, HA2.s, cin C1)        -> p2, C2
//   k=3  HA3 (A1B2, A0B3);  FA3m(A2B1, HA3.s, cin HA2.c)
//                           FA3b(A3B0, FA3m.s, cin C2)       -> p3, C3
//   k=4  FA4t(A2B2, A1B3, cin HA3.c);  FA4m(A3B1, FA4t.s, cin FA3m.c)
//        HA4 (FA4m.s, C3)                                    -> p4, C4
//   k=5  FA5m(A3B2, A2B3, cin FA4t.c)
//        FA5b(FA5m.s, FA4m.c, cin C4)                        -> p5, C5
//   k=6  FA6 (A3B3, FA5m.c, cin C5)                          -> p6, C6 = p7
// The cell placement and the names C1..C6 of the final-row carries follow the
// published 4-bit array and its CBL version. Which of a cell's three inputs
// acts as the "previous carry" (the multiplexer select) is this design's
// choice: it is the carry arriving from the neighbouring, less significant
// column in the same row, so the long carry path p2 -> p7 runs through
// multiplexers only.
//
// Gate budget (matches the published count for the proposed multiplier):
// 24 AND (16 partial products + 8 in CBL cells), 8 NOT, 8 XOR, 8 OR,
// 4 half adders, 16 two-input multiplexers, no full adders.
//
// Interface: a, b operands (A3..A0, B3..B0); p product (S7..S0); c the
// final-row carries, c[0] = C1 ... c[5] = C6. Purely combinational: p is
// valid one settle time after a and b change, there is no clock, reset or
// handshake.
module cbl_multiplier
  import cbl_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p,
  output logic [5:0] c
);

  pp_matrix_t pp;   // pp[j][i] = AiBj

  pp_gen u_pp (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  // Internal sums and carries, named after the cell that drives them.
  logic s_h2, c_h2, s_h3, c_h3;
  logic s_3m, c_3m;
  logic s_4t, c_4t, s_4m, c_4m;
  logic s_5m, c_5m;
  logic c1, c2, c3, c4, c5, c6;

  // Column 0
  assign p[0] = pp[0][0];

  // Column 1
  half_adder u_ha1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .cout(c1));

  // Column 2
  half_adder     u_ha2 (.a(pp[1][1]), .b(pp[2][0]), .sum(s_h2), .cout(c_h2));
  cbl_full_adder u_fa2 (.a(pp[0][2]), .b(s_h2), .cin(c1), .sum(p[2]), .cout(c2));

  // Column 3
  half_adder     u_ha3  (.a(pp[2][1]), .b(pp[3][0]), .sum(s_h3), .cout(c_h3));
  cbl_full_adder u_fa3m (.a(pp[1][2]), .b(s_h3), .cin(c_h2), .sum(s_3m), .cout(c_3m));
  cbl_full_adder u_fa3b (.a(pp[0][3]), .b(s_3m), .cin(c2), .sum(p[3]), .cout(c3));

  // Column 4
  cbl_full_adder u_fa4t (.a(pp[2][2]), .b(pp[3][1]), .cin(c_h3), .sum(s_4t), .cout(c_4t));
  cbl_full_adder u_fa4m (.a(pp[1][3]), .b(s_4t), .cin(c_3m), .sum(s_4m), .cout(c_4m));
  half_adder     u_ha4  (.a(s_4m), .b(c3), .sum(p[4]), .cout(c4));

  // Column 5
  cbl_full_adder u_fa5m (.a(pp[2][3]), .b(pp[3][2]), .cin(c_4t), .sum(s_5m), .cout(c_5m));
  cbl_full_adder u_fa5b (.a(s_5m), .b(c_4m), .cin(c4), .sum(p[5]), .cout(c5));

  // Column 6 and the final carry
  cbl_full_adder u_fa6 (.a(pp[3][3]), .b(c_5m), .cin(c5), .sum(p[6]), .cout(c6));
  assign p[7] = c6;

  assign c = {c6, c5, c4, c3, c2, c1};

endmodule
