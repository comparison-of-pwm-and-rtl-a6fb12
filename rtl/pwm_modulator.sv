// pwm_modulator: classical pulse-width modulator for a PWM DAC.
//
// An M-bit free-running counter is compared with the M-bit input code; the
// pin is high while counter < code and is registered by a D flip-flop. In
// every period of 2^M clocks the pin is therefore high for `code`
// consecutive clocks at the start of the period: duty cycle = code / 2^M,
// one pulse per period, modulation frequency f_sys / 2^M (97.7 kHz for
// M = 9 at 50 MHz). An external RC low-pass filter turns the pin into the
// analog value code / 2^M * V_DD.
//
// Timing: the pin lags the counter by one clock (the output flip-flop);
// `period_start` is high in the first clock of each period as seen at the
// pin. The code is wired straight to the comparator, as in the classical
// structure: a new code takes effect at the next clock, not at the next
// period boundary. The structure follows the classical PWM DAC; reset
// behaviour and the `period_start` flag are this design's choices.
module pwm_modulator #(
  parameter int unsigned M = dac_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] code,
  output logic         pwm_out,
  output logic         period_start
);

  logic [M-1:0] count;
  logic         cmp;

  mbit_counter #(.M(M)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .count (count)
  );

  lt_comparator #(.M(M)) u_cmp (
    .a      (count),
    .b      (code),
    .a_lt_b (cmp)
  );

  output_dff u_dff (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (cmp),
    .q     (pwm_out)
  );

  // Counter value 0 reaches the pin one clock after it is in the counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_start <= 1'b0;
    else        period_start <= (count == '0);
  end

endmodule
