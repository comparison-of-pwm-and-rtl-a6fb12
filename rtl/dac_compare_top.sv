// dac_compare_top: PWM DAC and PCM DAC side by side, driven by one
// digital sawtooth.
//
// A sawtooth_gen produces an M-bit ramp code that feeds a pwm_modulator and
// a pcm_modulator at the same time. Each modulator pin is meant to drive
// its own external second-order RC low-pass filter (R, C then 2R, C/2;
// 5 kOhm, 1 nF, 10 kOhm, 0.5 nF, about 30 kHz corner), whose output is the
// analog sawtooth. Both modulators use the same hardware; only the
// counter-to-comparator wiring differs, so the two analog outputs have the
// same mean value and differ only in switching ripple.
//
// Defaults follow the reference setup: M = 9 for both modulators, a 50 MHz
// clock. M_PWM < M runs the PWM modulator at lower resolution (and a higher
// PWM frequency) on the top M_PWM bits of the same code, as in the
// reduced-resolution PWM run (m = 7). STEP_CYCLES is this design's choice.
//
// Timing: each pin lags its modulator counter by one clock; the
// `*_period_start` flags mark the first clock of each modulation period at
// the pins (scope triggers), `code` and `ramp_wrap` come straight from the
// sawtooth generator.
module dac_compare_top #(
  parameter int unsigned M           = dac_pkg::M_DEFAULT,
  parameter int unsigned M_PWM       = dac_pkg::M_DEFAULT,
  parameter int unsigned STEP_CYCLES = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         pwm_out,
  output logic         pcm_out,
  output logic         pwm_period_start,
  output logic         pcm_period_start,
  output logic [M-1:0] code,
  output logic         ramp_wrap
);

  sawtooth_gen #(.M(M), .STEP_CYCLES(STEP_CYCLES)) u_saw (
    .clk       (clk),
    .rst_n     (rst_n),
    .code      (code),
    .ramp_wrap (ramp_wrap)
  );

  pwm_modulator #(.M(M_PWM)) u_pwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .code         (code[M-1 -: M_PWM]),
    .pwm_out      (pwm_out),
    .period_start (pwm_period_start)
  );

  pcm_modulator #(.M(M)) u_pcm (
    .clk          (clk),
    .rst_n        (rst_n),
    .code         (code),
    .pcm_out      (pcm_out),
    .period_start (pcm_period_start)
  );

  initial begin
    assert (M_PWM >= 1 && M_PWM <= M) else $error("M_PWM must be between 1 and M");
  end

endmodule
