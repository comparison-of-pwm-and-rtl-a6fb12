// pcm_modulator: pulse-count modulator for a PCM DAC.
//
// Identical to the PWM modulator except for the wiring between counter and
// comparator: counter bit i drives comparator IN A bit M-1-i (MSB and LSB
// crossed). The bit-reversed count visits every value once per period, so
// the pin is still high for exactly `code` of the 2^M clocks (same duty
// cycle, code / 2^M), but the high clocks are spread evenly over the period
// instead of forming one pulse. For code = 2^(M-1) the pin toggles every
// clock, and for any code whose lowest set bit is bit k the pattern repeats
// every 2^(M-k) clocks. The switching energy thus moves to frequencies far
// above f_sys / 2^M, where the same RC filter suppresses it much better.
//
// Timing: the pin lags the counter by one clock (output flip-flop);
// `period_start` is high in the first clock of each period at the pin. The
// code is wired straight to the comparator, so a new code takes effect at
// the next clock. The crossed wiring follows the pulse-count structure;
// reset behaviour and `period_start` are this design's choices.
module pcm_modulator #(
  parameter int unsigned M = dac_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] code,
  output logic         pcm_out,
  output logic         period_start
);

  logic [M-1:0] count;
  logic [M-1:0] count_rev;
  logic         cmp;

  mbit_counter #(.M(M)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .count (count)
  );

  // Counter MSB to comparator LSB and so on down: pure wiring.
  always_comb count_rev = M'(dac_pkg::bit_reverse(32'(count), M));

  lt_comparator #(.M(M)) u_cmp (
    .a      (count_rev),
    .b      (code),
    .a_lt_b (cmp)
  );

  output_dff u_dff (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (cmp),
    .q     (pcm_out)
  );

  // Counter value 0 reaches the pin one clock after it is in the counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_start <= 1'b0;
    else        period_start <= (count == '0);
  end

endmodule
