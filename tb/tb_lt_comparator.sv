// tb_lt_comparator: exhaustive test of the 9-bit A<B comparator.
//
// Applies every pair (a, b) of 9-bit values and checks the output against
// an integer comparison done in the testbench. Also checks that the output
// is high for exactly b of the 2^M values of a, the property that makes the
// duty cycle equal b / 2^M.
module tb_lt_comparator;
  localparam int unsigned M = 9;
  localparam int unsigned N = 1 << M;

  logic [M-1:0] a, b;
  logic         a_lt_b;
  int           checks = 0, failures = 0;
  logic         done = 1'b0;

  lt_comparator dut (.a(a), .b(b), .a_lt_b(a_lt_b));

  initial begin
    for (int unsigned bi = 0; bi < N; bi++) begin
      int unsigned highs;
      highs = 0;
      for (int unsigned ai = 0; ai < N; ai++) begin
        a = M'(ai);
        b = M'(bi);
        #1;
        checks++;
        if (a_lt_b !== (ai < bi)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d out=%0b", ai, bi, a_lt_b);
        end
        if (a_lt_b) highs++;
      end
      checks++;
      if (highs != bi) begin
        failures++;
        $display("FAIL duty count for b=%0d is %0d", bi, highs);
      end
    end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * N * N);
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
