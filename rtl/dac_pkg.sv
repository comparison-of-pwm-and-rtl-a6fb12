// dac_pkg: shared constants and helpers for the PWM/PCM DAC modulators.
//
// Holds the default modulator resolution (m = 9 bits, the size both
// modulators are built with in the reference setup) and the bit
// reversal that turns a PWM modulator into a pulse-count modulator.
// bit_reverse() swaps bit i with bit M-1-i of an M-bit value held in the
// low bits of a 32-bit word; it is pure wiring once M is a constant.
package dac_pkg;

  // Modulator resolution m used by the reference setup.
  localparam int unsigned M_DEFAULT = 9;

  // Reverse the order of the low m bits of v (bit i goes to bit m-1-i).
  function automatic logic [31:0] bit_reverse(input logic [31:0] v, input int unsigned m);
    logic [31:0] r;
    r = '0;
    for (int unsigned i = 0; i < m; i++) r[m-1-i] = v[i];
    return r;
  endfunction

endpackage
