// tb_dac_compare_top: end-to-end test of the PWM/PCM DAC comparison at its
// default size (9-bit sawtooth, 9-bit PWM and PCM modulators, 50 MHz).
//
// The top runs from reset through two full sawtooth ramps (2 x 49152
// clocks). Every clock the testbench checks, against its own model of the
// counter and the sawtooth:
//   - the code port: code = floor(k / 96) mod 512 after k clocks,
//   - the PWM pin: high iff (k-1) mod 512 < code(k-1),
//   - the PCM pin: high iff reverse9((k-1) mod 512) < code(k-1),
//   - both period_start flags and the ramp_wrap pulse.
// Each pin drives a model of the external RC filter, and a third filter is
// driven by the ideal voltage code/512 * 3.3 V. Over the second ramp the
// testbench takes the peak-to-peak deviation of each filtered pin from the
// ideal filtered ramp as its switching noise and converts it to effective
// bits, log2(3.3 V / noise), the rule "noise below one LSB". It checks
// that the PCM output reaches at least 8 effective bits, that it beats PWM
// by at least 2 bits, and that both have the same mean (equal duty).
// It also counts the mechanisms of the design and fails if one never
// occurred: PWM and PCM period starts, ramp wrap, code 0 (pins stay low),
// full-scale code 511, single PWM pulse per period, PCM toggling every
// clock at mid-scale.
module tb_dac_compare_top;
  localparam int unsigned M     = 9;
  localparam int unsigned N     = 1 << M;
  localparam int unsigned STEP  = 96;
  localparam int unsigned RAMP  = N * STEP;
  localparam real         VDD   = 3.3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         pwm_out, pcm_out, pwm_ps, pcm_ps, ramp_wrap;
  logic [M-1:0] code;
  int           checks = 0, failures = 0;

  dac_compare_top dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .pwm_out          (pwm_out),
    .pcm_out          (pcm_out),
    .pwm_period_start (pwm_ps),
    .pcm_period_start (pcm_ps),
    .code             (code),
    .ramp_wrap        (ramp_wrap)
  );

  // 50 MHz system clock
  always #10 clk = ~clk;

  real vin_pwm = 0.0, vin_pcm = 0.0, vin_ideal = 0.0;
  real vout_pwm, vout_pcm, vout_ideal;

  rc_filter2_model f_pwm   (.clk(clk), .vin(vin_pwm),   .vout(vout_pwm));
  rc_filter2_model f_pcm   (.clk(clk), .vin(vin_pcm),   .vout(vout_pcm));
  rc_filter2_model f_ideal (.clk(clk), .vin(vin_ideal), .vout(vout_ideal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned rev9(input int unsigned v);
    int unsigned r = 0;
    for (int unsigned i = 0; i < M; i++) if (((v >> i) & 1) != 0) r |= 1 << (M - 1 - i);
    return r;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  // mechanism counters
  int n_pwm_period = 0, n_pcm_period = 0, n_ramp_wrap = 0;
  int n_code_zero = 0, n_code_full = 0, n_pwm_single = 0, n_pcm_toggle = 0;

  initial begin
    int unsigned k, cnt_prev, code_prev, slot, code_pin;
    int unsigned rises_pwm, pcm_switches, high_pwm_total, high_pcm_total;
    real ideal_total;
    real emin_pwm, emax_pwm, emin_pcm, emax_pcm, e;
    real bits_pwm, bits_pcm;
    bit  prev_pwm, prev_pcm, all_toggle;

    repeat (3) @(negedge clk);
    check(!pwm_out && !pcm_out && code == 0, "reset state");
    rst_n = 1'b1;
    rises_pwm = 0; pcm_switches = 0; prev_pwm = 0; prev_pcm = 0; all_toggle = 1;
    high_pwm_total = 0; high_pcm_total = 0; ideal_total = 0.0;
    emin_pwm = 1.0e9; emax_pwm = -1.0e9; emin_pcm = 1.0e9; emax_pcm = -1.0e9;

    for (k = 0; k <= 2 * RAMP; k++) begin
      // k clocks after reset release; this is the negedge after clock k
      check(code == M'((k / STEP) % N), "sawtooth code");
      check(ramp_wrap == (k > 0 && k % RAMP == 0), "ramp_wrap");
      if (k > 0) begin
        cnt_prev  = (k - 1) % N;
        code_prev = ((k - 1) / STEP) % N;
        slot      = cnt_prev;
        code_pin  = code_prev;
        check(pwm_out == (cnt_prev < code_prev), "PWM pin");
        check(pcm_out == (rev9(cnt_prev) < code_prev), "PCM pin");
        check(pwm_ps == (slot == 0), "PWM period_start");
        check(pcm_ps == (slot == 0), "PCM period_start");
        if (pwm_ps) n_pwm_period++;
        if (pcm_ps) n_pcm_period++;
        if (ramp_wrap) n_ramp_wrap++;
        // per-period mechanism bookkeeping
        if (slot == 0) begin
          rises_pwm = 0; pcm_switches = 0; all_toggle = 1;
        end
        if (pwm_out && !prev_pwm) rises_pwm++;
        if (slot > 0 && pcm_out == prev_pcm) all_toggle = 0;
        if (code_pin == 0 && !pwm_out && !pcm_out) n_code_zero++;
        if (code_pin == N - 1) n_code_full++;
        if (slot == N - 1) begin
          if (rises_pwm == 1) n_pwm_single++;
          check(rises_pwm <= 1, "at most one PWM pulse per period");
        end
        // mid-scale: within the 96 clocks of code 256 the PCM pin alternates
        if (code_pin == N / 2 && slot > 0 && pcm_out != prev_pcm) pcm_switches++;
        if (code_pin == N / 2 && (k - 1) % STEP == STEP - 1 && pcm_switches >= STEP - 2)
          n_pcm_toggle++;
        prev_pwm = pwm_out;
        prev_pcm = pcm_out;
        // mean value over the second ramp
        if (k > RAMP) begin
          if (pwm_out) high_pwm_total++;
          if (pcm_out) high_pcm_total++;
          ideal_total += real'(code_pin) / real'(N);
          e = vout_pwm - vout_ideal;
          if (e < emin_pwm) emin_pwm = e;
          if (e > emax_pwm) emax_pwm = e;
          e = vout_pcm - vout_ideal;
          if (e < emin_pcm) emin_pcm = e;
          if (e > emax_pcm) emax_pcm = e;
        end
        vin_ideal = VDD * real'(code_pin) / real'(N);
      end
      vin_pwm = pwm_out ? VDD : 0.0;
      vin_pcm = pcm_out ? VDD : 0.0;
      @(negedge clk);
    end

    bits_pwm = log2r(VDD / (emax_pwm - emin_pwm));
    bits_pcm = log2r(VDD / (emax_pcm - emin_pcm));
    $display("switching noise p-p: PWM %0.2f mV (%0.2f bits), PCM %0.2f mV (%0.2f bits), 1 LSB = %0.2f mV",
             1.0e3 * (emax_pwm - emin_pwm), bits_pwm, 1.0e3 * (emax_pcm - emin_pcm), bits_pcm,
             1.0e3 * VDD / N);
    $display("high clocks over one ramp: PWM %0d, PCM %0d, ideal %0.1f",
             high_pwm_total, high_pcm_total, ideal_total);
    check(bits_pcm >= 8.0, "PCM reaches about 9 effective bits");
    check(bits_pcm >= bits_pwm + 2.0, "PCM at least 2 bits better than 9-bit PWM");
    check(absr(real'(high_pwm_total) - ideal_total) < 0.01 * ideal_total, "PWM mean equals code");
    check(absr(real'(high_pcm_total) - ideal_total) < 0.01 * ideal_total, "PCM mean equals code");

    $display("mechanisms: pwm_periods=%0d pcm_periods=%0d ramp_wraps=%0d code0_clocks=%0d full_scale_clocks=%0d pwm_single_pulse=%0d pcm_toggle_steps=%0d",
             n_pwm_period, n_pcm_period, n_ramp_wrap, n_code_zero, n_code_full, n_pwm_single, n_pcm_toggle);
    check(n_pwm_period > 0, "PWM period start occurred");
    check(n_pcm_period > 0, "PCM period start occurred");
    check(n_ramp_wrap > 0, "ramp wrap occurred");
    check(n_code_zero > 0, "code 0 held pins low");
    check(n_code_full > 0, "full-scale code occurred");
    check(n_pwm_single > 0, "single PWM pulse per period occurred");
    check(n_pcm_toggle > 0, "PCM toggled every clock at mid-scale");
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
