// tb_sawtooth_gen: self-checking test of the sawtooth code generator.
//
// Runs the default generator (9-bit code, a step every 96 clocks) for a bit
// more than one full ramp and a short-step instance (4-bit code, a step
// every 3 clocks) for several ramps. Each clock the code and the wrap pulse
// are compared with a testbench model; the testbench also checks that each
// code value is held for exactly STEP_CYCLES clocks and that the ramp
// period is 2^M * STEP_CYCLES clocks (49152 clocks, about 1.02 kHz at
// 50 MHz, for the defaults).
module tb_sawtooth_gen;
  localparam int unsigned MA = 9,  SA = 96, NA = 1 << MA;
  localparam int unsigned MB = 4,  SB = 3,  NB = 1 << MB;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [MA-1:0] code_a;
  logic [MB-1:0] code_b;
  logic          wrap_a, wrap_b;
  int            checks = 0, failures = 0;

  sawtooth_gen                          dut_a (.clk(clk), .rst_n(rst_n), .code(code_a), .ramp_wrap(wrap_a));
  sawtooth_gen #(.M(MB), .STEP_CYCLES(SB)) dut_b (.clk(clk), .rst_n(rst_n), .code(code_b), .ramp_wrap(wrap_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int unsigned t_end;
    int          last_wrap_a, last_wrap_b, held_a;
    logic [MA-1:0] prev_a;
    t_end = NA * SA + 5 * SA;
    repeat (2) @(negedge clk);
    check(code_a == 0 && code_b == 0 && !wrap_a && !wrap_b, "reset state");
    rst_n = 1'b1;
    last_wrap_a = -1; last_wrap_b = -1; held_a = 0; prev_a = '0;
    // t counts clocks since reset release; model: code = (t / S) mod 2^M
    for (int t = 0; t < int'(t_end); t++) begin
      check(code_a == MA'((t / SA) % NA), "9-bit code");
      check(code_b == MB'((t / SB) % NB), "4-bit code");
      check(wrap_a == (t > 0 && t % (SA * NA) == 0), "9-bit ramp_wrap");
      check(wrap_b == (t > 0 && t % (SB * NB) == 0), "4-bit ramp_wrap");
      if (code_a == prev_a) held_a++;
      else begin
        check(held_a == int'(SA), "each code held STEP_CYCLES clocks");
        held_a = 1;
      end
      prev_a = code_a;
      if (wrap_a) begin
        if (last_wrap_a >= 0) check(t - last_wrap_a == int'(SA * NA), "9-bit ramp period");
        last_wrap_a = t;
      end
      if (wrap_b) begin
        if (last_wrap_b >= 0) check(t - last_wrap_b == int'(SB * NB), "4-bit ramp period");
        last_wrap_b = t;
      end
      @(negedge clk);
    end
    check(last_wrap_a == int'(SA * NA), "9-bit ramp wrapped once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NA * SA) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
