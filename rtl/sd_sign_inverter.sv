// sd_sign_inverter: polarity inversion of one radix-5 signed digit.
//
// In the current-mode circuit this is a pair of current mirrors that reverses
// the direction of a bidirectional current; at digit level it maps x to -x.
// It is the only active element besides the pass switches in the barrel-shifter
// multiplier, and it also applies the sign of a carry or shifted digit that
// wraps from the top digit position back to position 0.
//
// Interface: din in {-2..2}, dout = -din. Purely combinational, no clock.
// The digit range and two's-complement coding are this design's choice; the
// function (invert the polarity of the input) is the one the circuit performs.
module sd_sign_inverter
  import rns_pkg::*;
(
  input  sd_t din,
  output sd_t dout
);

  assign dout = -din;

endmodule
