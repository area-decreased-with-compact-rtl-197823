// cbl_full_adder: full adder built from shared common Boolean logic (CBL).
//
// A carry-select full adder normally holds two full adders, one computing the
// sum and carry for carry-in 0 and one for carry-in 1, and picks between them
// with the real carry-in. Looking at the full-adder truth table, both pairs
// come from a and b alone:
//   carry-in 0: sum0 = a ^ b,      carry0 = a & b
//   carry-in 1: sum1 = ~(a ^ b),   carry1 = a | b
// so the two adders collapse into one XOR, one inverter, one AND and one OR.
// Two 2:1 multiplexers, both steered by the previous carry (cin), then choose
// the pair that applies. That is the gate set the design prices one cell at:
// 1 AND, 1 NOT, 1 XOR, 1 OR and 2 multiplexers.
//
// Interface: a, b addend bits; cin the previous carry, which only drives the
// multiplexer selects; sum, cout the results, equal to an ordinary full adder.
// Combinational. Because cin reaches the outputs through one multiplexer
// only, a carry rippling through a chain of these cells sees one mux delay per
// cell; a and b settle through XOR/NOT or AND/OR first.
module cbl_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic hsum;      // half sum, the sum for carry-in 0
  logic hsum_n;    // its inverse, the sum for carry-in 1
  logic carry0;    // carry for carry-in 0
  logic carry1;    // carry for carry-in 1

  assign hsum   = a ^ b;
  assign hsum_n = ~hsum;
  assign carry0 = a & b;
  assign carry1 = a | b;

  mux2 u_sum_mux (
    .d0  (hsum),
    .d1  (hsum_n),
    .sel (cin),
    .y   (sum)
  );

  mux2 u_carry_mux (
    .d0  (carry0),
    .d1  (carry1),
    .sel (cin),
    .y   (cout)
  );

endmodule
