// tb_output_dff: test of the modulator output flip-flop.
//
// Drives random data and checks that q equals the d sampled at the previous
// rising edge, that q does not change between edges, and that the
// asynchronous reset forces q low without a clock edge.
module tb_output_dff;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b0;
  logic q;
  int   checks = 0, failures = 0;

  output_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic prev;
    d = 1'b1;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "q low in reset");
    rst_n = 1'b1;
    prev  = d;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      check(q == prev, "q follows d one clock later");
      d = 1'($urandom);
      #2;
      check(q == prev, "q holds between edges");
      prev = d;
    end
    // force a 1, then reset asynchronously
    d = 1'b1;
    @(negedge clk);
    check(q == 1'b1, "q high before reset");
    #2 rst_n = 1'b0;
    #1 check(q == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
