// tb_dac_pwm7_workload: the reduced-resolution PWM run next to the 9-bit
// PCM DAC.
//
// Two copies of the top run from one clock: the default one (9-bit PWM and
// 9-bit PCM) and one whose PWM modulator uses only the top 7 bits of the
// sawtooth code (M_PWM = 7, PWM frequency 50 MHz / 128 = 391 kHz instead of
// 97.7 kHz). Every clock the 7-bit PWM pin is checked against a testbench
// model (high iff (k-1) mod 128 < code(k-1) >> 2). All three pins drive
// models of the external RC filter; over the second sawtooth ramp the
// testbench measures the peak-to-peak deviation from the ideal filtered
// ramp and converts it to effective bits, log2(3.3 V / noise). Checks:
// the 7-bit PWM is clearly better than the 9-bit PWM (at least 1.5 bits),
// reaches at least 5 effective bits, and the 9-bit PCM stays about
// 2 bits (at least 1.9) ahead of the 7-bit PWM.
module tb_dac_pwm7_workload;
  localparam int unsigned M    = 9;
  localparam int unsigned N    = 1 << M;
  localparam int unsigned M7   = 7;
  localparam int unsigned N7   = 1 << M7;
  localparam int unsigned STEP = 96;
  localparam int unsigned RAMP = N * STEP;
  localparam real         VDD  = 3.3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         pwm9, pcm9, pwm7, pcm_b;
  logic         ps9a, ps9b, ps7a, ps7b, wrap9, wrap7;
  logic [M-1:0] code9, code7;
  int           checks = 0, failures = 0;

  dac_compare_top u_ref (
    .clk(clk), .rst_n(rst_n), .pwm_out(pwm9), .pcm_out(pcm9),
    .pwm_period_start(ps9a), .pcm_period_start(ps9b), .code(code9), .ramp_wrap(wrap9)
  );

  dac_compare_top #(.M_PWM(M7)) u_pwm7 (
    .clk(clk), .rst_n(rst_n), .pwm_out(pwm7), .pcm_out(pcm_b),
    .pwm_period_start(ps7a), .pcm_period_start(ps7b), .code(code7), .ramp_wrap(wrap7)
  );

  always #10 clk = ~clk;

  real vin9 = 0.0, vin7 = 0.0, vinc = 0.0, vin_ideal = 0.0;
  real vo9, vo7, voc, vo_ideal;

  rc_filter2_model f9 (.clk(clk), .vin(vin9),      .vout(vo9));
  rc_filter2_model f7 (.clk(clk), .vin(vin7),      .vout(vo7));
  rc_filter2_model fc (.clk(clk), .vin(vinc),      .vout(voc));
  rc_filter2_model fi (.clk(clk), .vin(vin_ideal), .vout(vo_ideal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  initial begin
    int unsigned code_prev, n7_periods;
    real lo9, hi9, lo7, hi7, loc, hic, e, b9, b7, bc;
    lo9 = 1.0e9; hi9 = -1.0e9; lo7 = 1.0e9; hi7 = -1.0e9; loc = 1.0e9; hic = -1.0e9;
    n7_periods = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned k = 0; k <= 2 * RAMP; k++) begin
      if (k > 0) begin
        code_prev = ((k - 1) / STEP) % N;
        check(pwm7 == (((k - 1) % N7) < (code_prev >> (M - M7))), "7-bit PWM pin");
        check(ps7a == (((k - 1) % N7) == 0), "7-bit PWM period_start");
        check(code7 == code9, "both tops share the same sawtooth");
        if (ps7a) n7_periods++;
        if (k > RAMP) begin
          e = vo9 - vo_ideal; if (e < lo9) lo9 = e; if (e > hi9) hi9 = e;
          e = vo7 - vo_ideal; if (e < lo7) lo7 = e; if (e > hi7) hi7 = e;
          e = voc - vo_ideal; if (e < loc) loc = e; if (e > hic) hic = e;
        end
        vin_ideal = VDD * real'(code_prev) / real'(N);
      end
      vin9 = pwm9 ? VDD : 0.0;
      vin7 = pwm7 ? VDD : 0.0;
      vinc = pcm9 ? VDD : 0.0;
      @(negedge clk);
    end
    b9 = log2r(VDD / (hi9 - lo9));
    b7 = log2r(VDD / (hi7 - lo7));
    bc = log2r(VDD / (hic - loc));
    $display("effective bits: PWM m=9 %0.2f, PWM m=7 %0.2f, PCM m=9 %0.2f (7-bit PWM periods %0d)",
             b9, b7, bc, n7_periods);
    check(n7_periods == 2 * RAMP / N7, "7-bit PWM period is 128 clocks");
    check(b7 >= b9 + 1.5, "7-bit PWM beats 9-bit PWM");
    check(b7 >= 5.0, "7-bit PWM reaches at least 5 effective bits");
    check(bc >= b7 + 1.9, "PCM about 2 bits ahead of 7-bit PWM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * RAMP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
