// mbit_counter: free-running m-bit up counter, the time base of one
// modulation period.
//
// The counter advances by one on every rising edge of clk (f_sys) and wraps
// from 2^M-1 to 0, so one modulation period lasts 2^M clocks and the
// modulation frequency is f_sys / 2^M. The count is valid from the first
// clock after reset and changes on every rising edge.
// The counter follows the modulator block diagrams; the asynchronous
// active-low reset to 0 is this design's choice.
module mbit_counter #(
  parameter int unsigned M = dac_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [M-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

endmodule
