// tb_pwm_modulator: self-checking test of the PWM modulator.
//
// Two instances run from one clock and reset: the default 9-bit modulator
// and a 4-bit one (the 16-slot example that illustrates the two schemes). Codes
// change only at period boundaries. Every clock the pin is compared with a
// testbench model (pin high in slot s of the period iff s < code, one clock
// after the counter), and for every period the testbench checks:
//   - the number of high clocks equals the code (duty = code / 2^m),
//   - the pin has exactly one rising edge per period when 0 < code,
//   - for the 4-bit instance, the 16-slot high/low mask equals the left
//     expected PWM pattern (the first `code` slots high),
//   - period_start marks slot 0 and periods are 2^m clocks long.
module tb_pwm_modulator;
  localparam int unsigned MA = 9;
  localparam int unsigned NA = 1 << MA;
  localparam int unsigned MB = 4;
  localparam int unsigned NB = 1 << MB;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [MA-1:0] code_a = '0;
  logic [MB-1:0] code_b = '0;
  logic          out_a, out_b, ps_a, ps_b;
  int            checks = 0, failures = 0;

  pwm_modulator              dut_a (.clk(clk), .rst_n(rst_n), .code(code_a), .pwm_out(out_a), .period_start(ps_a));
  pwm_modulator #(.M(MB))    dut_b (.clk(clk), .rst_n(rst_n), .code(code_b), .pwm_out(out_b), .period_start(ps_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // codes for the 9-bit instance, one per period
  int unsigned codes_a[$] = '{0, 1, 2, 255, 256, 257, 510, 511, 3, 100};

  initial begin
    int unsigned cnt;                 // model of the counter (clock after reset = 0)
    int unsigned ncodes;
    bit          exp_a, exp_b;        // expected pin value at the next negedge
    int unsigned pin_code_a, pin_code_b;
    int unsigned highs_a, highs_b, rises_a;
    bit          prev_a;
    logic [NB-1:0] mask_b;

    for (int i = 0; i < 6; i++) codes_a.push_back($urandom_range(NA - 1));
    ncodes = codes_a.size();

    repeat (3) @(negedge clk);
    check(out_a == 0 && out_b == 0, "pins low in reset");
    rst_n = 1'b1;
    cnt = 0;
    exp_a = 0; exp_b = 0;
    highs_a = 0; highs_b = 0; rises_a = 0; prev_a = 0; mask_b = '0;
    pin_code_a = 0; pin_code_b = 0;

    for (int unsigned t = 0; t < ncodes * NA + 1; t++) begin
      // pin now shows counter value cnt-1 (one clock of latency)
      if (t > 0) begin
        int unsigned slot_a, slot_b;
        slot_a = (cnt + NA - 1) % NA;
        slot_b = slot_a % NB;
        check(out_a == exp_a, "9-bit pin matches model");
        check(out_b == exp_b, "4-bit pin matches model");
        check(ps_a == (slot_a == 0), "9-bit period_start");
        check(ps_b == (slot_b == 0), "4-bit period_start");
        if (out_a) highs_a++;
        if (out_a && !prev_a) rises_a++;
        prev_a = out_a;
        if (out_b) highs_b++;
        mask_b[slot_b] = out_b;
        if (slot_b == NB - 1) begin
          logic [NB-1:0] fig_mask;
          fig_mask = NB'((1 << pin_code_b) - 1);
          check(highs_b == pin_code_b, "4-bit duty count");
          check(mask_b == fig_mask, "4-bit slot pattern (PWM)");
          highs_b = 0;
        end
        if (slot_a == NA - 1) begin
          check(highs_a == pin_code_a, "9-bit duty count");
          check(rises_a == ((pin_code_a > 0) ? 1 : 0), "one pulse per PWM period");
          highs_a = 0; rises_a = 0;
        end
      end
      if (t == ncodes * NA) break;
      // new codes at period boundaries
      if (cnt % NB == 0) begin
        code_b     = MB'((cnt / NB) % NB);
        pin_code_b = int'(code_b);
      end
      if (cnt == 0) begin
        code_a     = MA'(codes_a[t / NA]);
        pin_code_a = int'(code_a);
      end
      exp_a = (cnt < code_a);
      exp_b = ((cnt % NB) < code_b);
      @(negedge clk);
      cnt = (cnt + 1) % NA;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * NA) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
