// output_dff: the D flip-flop at the modulator output pin.
//
// Retimes the comparator result to the system clock so that the pin
// changes only on the clock edge and carries no comparator glitches.
// Q follows D one clock later. The asynchronous active-low reset, which
// drives the pin low, is this design's choice.
module output_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
