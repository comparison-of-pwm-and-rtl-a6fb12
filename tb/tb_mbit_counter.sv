// tb_mbit_counter: self-checking test of the free-running m-bit counter.
//
// Runs the default 9-bit counter for several full periods after reset and
// compares `count` each clock with a reference count kept by the
// testbench. Also checks that a mid-run reset returns the count to 0 and
// that the period is exactly 2^M clocks (spacing of the 2^M-1 to 0 wrap).
module tb_mbit_counter;
  localparam int unsigned M = 9;
  localparam int unsigned N = 1 << M;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [M-1:0] count;
  int           checks = 0, failures = 0;

  mbit_counter dut (.clk(clk), .rst_n(rst_n), .count(count));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int unsigned ref_cnt;
    int          last_wrap;
    repeat (3) @(negedge clk);
    check(count == 0, "count 0 in reset");
    rst_n = 1'b1;
    ref_cnt   = 0;
    last_wrap = -1;
    for (int t = 0; t < 4 * N + 7; t++) begin
      check(count == M'(ref_cnt), "count matches reference");
      if (count == '0) begin
        if (last_wrap >= 0) check(t - last_wrap == int'(N), "period is 2^M clocks");
        last_wrap = t;
      end
      @(negedge clk);
      ref_cnt = (ref_cnt + 1) % N;
    end
    // reset in the middle of a period
    rst_n = 1'b0;
    #1;
    check(count == 0, "asynchronous reset clears count");
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 1, "count restarts after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
