// tb_cbl_full_adder: self-checking test of the CBL full-adder cell.
// Walks the eight rows of the full-adder truth table (carry-in, a, b ->
// sum, carry-out), held here as a constant table, and also checks each row
// against the integer sum a + b + cin. It counts how often the cell's
// multiplexers chose the carry-in-0 pair and the carry-in-1 pair and fails
// if either never happened.
module tb_cbl_full_adder;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;
  int   sel0_seen = 0;
  int   sel1_seen = 0;

  // Rows indexed by {cin, a, b}; each entry is {sum, cout}.
  localparam logic [1:0] TRUTH [8] = '{
    2'b00, 2'b10, 2'b10, 2'b01,   // cin = 0
    2'b10, 2'b01, 2'b01, 2'b11    // cin = 1
  };

  cbl_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, a, b} = 3'(v);
      #1;
      if (cin) sel1_seen++; else sel0_seen++;
      checks++;
      if ({sum, cout} !== TRUTH[v]) begin
        failures++;
        $display("FAIL table cin=%0b a=%0b b=%0b -> sum=%0b cout=%0b", cin, a, b, sum, cout);
      end
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL arith cin=%0b a=%0b b=%0b", cin, a, b);
      end
    end
    checks++;
    if (sel0_seen == 0 || sel1_seen == 0) begin
      failures++;
      $display("FAIL a multiplexer setting was never exercised");
    end
    $display("carry-in 0 pair selected %0d times, carry-in 1 pair %0d times", sel0_seen, sel1_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
