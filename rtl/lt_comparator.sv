// lt_comparator: unsigned M-bit magnitude comparator with output A<B.
//
// IN A carries the (possibly bit-reversed) counter value, IN B the digital
// input code. The output is high while A < B, so over one full counter
// sweep it is high for exactly B of the 2^M counter values, which gives a
// duty cycle of B / 2^M. Purely combinational.
module lt_comparator #(
  parameter int unsigned M = dac_pkg::M_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         a_lt_b
);

  assign a_lt_b = (a < b);

endmodule
