// half_adder: one-bit half adder, {cout, sum} = a + b.
//
// sum = a XOR b and cout = a AND b. The multiplier keeps four ordinary half
// adders where a column has only two bits to add; only its full adders are
// replaced by CBL cells. The gate-level form (one XOR, one AND) is the usual
// one and this design's choice; the design only names the half adder and
// prices it at six gate units.
//
// Interface: a, b addend bits; sum, cout results. Combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b;
  assign cout = a & b;

endmodule
