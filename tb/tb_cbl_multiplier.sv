// tb_cbl_multiplier: end-to-end self-checking test of the 4x4 CBL multiplier.
//
// 1. The two worked examples the design was demonstrated with: 11 x 10 = 110
//    and 15 x 11 = 165 (binary 1111 x 1011 = 10100101).
// 2. All 256 operand pairs. The product must equal a * b, and the six
//    final-row carries C1..C6 must match a reference that recomputes the
//    same column reduction with integer additions ({carry, sum} = x + y + z)
//    instead of gates.
// 3. Mechanism coverage: for each of the eight CBL cells the test counts how
//    often its previous carry selected the carry-in-0 pair and the carry-in-1
//    pair, and counts a failure for any cell where one of the two never
//    happened. It also counts products that set the top bit p7 (the carry out
//    of the last cell).
// The multiplier is combinational at its only size (4 x 4), so this is also
// the full-size test: the top is instantiated without parameters.
module tb_cbl_multiplier;
  import cbl_pkg::*;

  operand_t   a, b;
  product_t   p;
  logic [5:0] c;
  int         checks   = 0;
  int         failures = 0;

  cbl_multiplier dut (.a(a), .b(b), .p(p), .c(c));

  // Previous-carry (multiplexer select) input of every CBL cell.
  localparam int NCELL = 8;
  logic [NCELL-1:0] cell_cin;
  assign cell_cin = {dut.u_fa6.cin,  dut.u_fa5b.cin, dut.u_fa5m.cin,
                     dut.u_fa4m.cin, dut.u_fa4t.cin, dut.u_fa3b.cin,
                     dut.u_fa3m.cin, dut.u_fa2.cin};
  localparam string CELL_NAME [NCELL] = '{"FA2", "FA3m", "FA3b", "FA4t",
                                          "FA4m", "FA5m", "FA5b", "FA6"};
  int sel0_count [NCELL];
  int sel1_count [NCELL];
  int top_bit_count = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integer reference of the final-row carries C1..C6 for operands x, y.
  function automatic logic [5:0] ref_carries(logic [3:0] x, logic [3:0] y);
    int ab [4][4];   // ab[i][j] = Ai & Bj
    int s_h2, c_h2, s_h3, c_h3, s_3m, c_3m, s_4t, c_4t, s_4m, c_4m, s_5m, c_5m;
    int c1, c2, c3, c4, c5, c6, t;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        ab[i][j] = int'(x[i] & y[j]);
    t = ab[0][1] + ab[1][0];              c1 = t / 2;
    t = ab[1][1] + ab[0][2];              s_h2 = t % 2; c_h2 = t / 2;
    t = ab[2][0] + s_h2 + c1;             c2 = t / 2;
    t = ab[1][2] + ab[0][3];              s_h3 = t % 2; c_h3 = t / 2;
    t = ab[2][1] + s_h3 + c_h2;           s_3m = t % 2; c_3m = t / 2;
    t = ab[3][0] + s_3m + c2;             c3 = t / 2;
    t = ab[2][2] + ab[1][3] + c_h3;       s_4t = t % 2; c_4t = t / 2;
    t = ab[3][1] + s_4t + c_3m;           s_4m = t % 2; c_4m = t / 2;
    t = s_4m + c3;                        c4 = t / 2;
    t = ab[3][2] + ab[2][3] + c_4t;       s_5m = t % 2; c_5m = t / 2;
    t = s_5m + c_4m + c4;                 c5 = t / 2;
    t = ab[3][3] + c_5m + c5;             c6 = t / 2;
    return {c6[0], c5[0], c4[0], c3[0], c2[0], c1[0]};
  endfunction

  task automatic apply(int x, int y);
    a = operand_t'(x);
    b = operand_t'(y);
    #1;
    for (int k = 0; k < NCELL; k++) begin
      if (cell_cin[k]) sel1_count[k]++;
      else             sel0_count[k]++;
    end
    if (p[7]) top_bit_count++;
  endtask

  task automatic expect_product(int x, int y, int want);
    apply(x, y);
    checks++;
    if (int'(p) != want) begin
      failures++;
      $display("FAIL %0d x %0d: p=%0d, expected %0d", x, y, p, want);
    end
  endtask

  initial begin
    foreach (sel0_count[k]) begin
      sel0_count[k] = 0;
      sel1_count[k] = 0;
    end

    // Worked examples: 1011 x 1010 and 1111 x 1011.
    expect_product(11, 10, 110);
    checks++;
    if (p !== 8'b0110_1110) begin
      failures++;
      $display("FAIL 11 x 10 bit pattern %b", p);
    end
    expect_product(15, 11, 165);
    checks++;
    if (p !== 8'b1010_0101) begin
      failures++;
      $display("FAIL 15 x 11 bit pattern %b", p);
    end

    // Exhaustive sweep.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        expect_product(x, y, x * y);
        checks++;
        if (c !== ref_carries(4'(x), 4'(y))) begin
          failures++;
          $display("FAIL %0d x %0d: carries C6..C1=%b, expected %b",
                   x, y, c, ref_carries(4'(x), 4'(y)));
        end
      end
    end

    // Every CBL cell must have used both of its precomputed result pairs.
    for (int k = 0; k < NCELL; k++) begin
      $display("%-5s previous carry 0: %0d times, 1: %0d times",
               CELL_NAME[k], sel0_count[k], sel1_count[k]);
      checks++;
      if (sel0_count[k] == 0 || sel1_count[k] == 0) begin
        failures++;
        $display("FAIL %s never selected one of its result pairs", CELL_NAME[k]);
      end
    end
    $display("products with p7 set: %0d", top_bit_count);
    checks++;
    if (top_bit_count == 0) begin
      failures++;
      $display("FAIL the final carry never reached p7");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
