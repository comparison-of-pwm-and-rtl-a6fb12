// sawtooth_gen: digital sawtooth test pattern for the DAC comparison.
//
// An M-bit code rises by one LSB every STEP_CYCLES clocks and wraps from
// 2^M-1 to 0, so after a DAC the analog output is a rising ramp with a
// sharp fall. The ramp period is 2^M * STEP_CYCLES clocks; with the
// defaults (M = 9, STEP_CYCLES = 96) and a 50 MHz clock that is 983 us,
// about 1.02 kHz, the sawtooth frequency of the reference measurements.
// The step size and the step interval are this design's choices; the
// reference setup only states that a sawtooth is generated digitally.
//
// Timing: `code` changes in the clock after the step timer reaches
// STEP_CYCLES-1; `ramp_wrap` is high for the one clock in which `code` has
// just returned to 0. Asynchronous active-low reset to code 0.
module sawtooth_gen #(
  parameter int unsigned M           = dac_pkg::M_DEFAULT,
  parameter int unsigned STEP_CYCLES = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [M-1:0] code,
  output logic         ramp_wrap
);

  localparam int unsigned TW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [TW-1:0] timer;
  logic          step;

  assign step = (timer == TW'(STEP_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      code      <= '0;
      ramp_wrap <= 1'b0;
    end else begin
      ramp_wrap <= 1'b0;
      if (step) begin
        timer     <= '0;
        code      <= code + 1'b1;
        ramp_wrap <= &code;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

  initial begin
    assert (STEP_CYCLES >= 1) else $error("STEP_CYCLES must be at least 1");
  end

endmodule
