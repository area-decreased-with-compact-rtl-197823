// tb_pp_gen: exhaustive self-checking test of the partial-product generator.
// For all 256 operand pairs, every pp[j][i] must equal bit i of a AND bit j
// of b, and the weighted sum of the matrix must equal a * b.
module tb_pp_gen;
  import cbl_pkg::*;

  operand_t   a, b;
  pp_matrix_t pp;
  int         checks   = 0;
  int         failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        int weighted;
        a = operand_t'(x);
        b = operand_t'(y);
        #1;
        weighted = 0;
        for (int j = 0; j < 4; j++) begin
          for (int i = 0; i < 4; i++) begin
            checks++;
            if (pp[j][i] !== (((x >> i) & 1) == 1 && ((y >> j) & 1) == 1)) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0b", x, y, j, i, pp[j][i]);
            end
            weighted += int'(pp[j][i]) << (i + j);
          end
        end
        checks++;
        if (weighted != x * y) begin
          failures++;
          $display("FAIL a=%0d b=%0d weighted sum %0d", x, y, weighted);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
