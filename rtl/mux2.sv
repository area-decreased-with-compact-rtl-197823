// mux2: one-bit 2:1 multiplexer, y = sel ? d1 : d0.
//
// Written in the four-gate sum-of-products form the design counts a
// multiplexer as: one inverter on the select, two AND gates and one OR gate,
// y = (d0 & ~sel) | (d1 & sel). The CBL full-adder cell uses two of these,
// both steered by the carry coming from the previous (less significant) cell.
//
// Interface: d0, d1 data, sel select, y output. Purely combinational; y
// follows the inputs after the AND-OR delay, no clock and no state.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);

  logic sel_n;
  logic pick0;
  logic pick1;

  assign sel_n = ~sel;
  assign pick0 = d0 & sel_n;
  assign pick1 = d1 & sel;
  assign y     = pick0 | pick1;

endmodule
