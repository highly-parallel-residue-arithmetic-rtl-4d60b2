// cm_bci: behavioural model (not synthesizable logic) of the bidirectional
// current input stage.
//
// A bidirectional input current x is steered into one of two branches by its
// direction: xp = x and xn = 0 when x >= 0; xp = 0 and xn = x when x < 0.
// The detectors downstream then only ever see one polarity. Currents are real
// numbers in units of the unit current; no delay.
module cm_bci (
  input  real x,
  output real xp,
  output real xn
);

  always_comb begin
    xp = (x >= 0.0) ? x : 0.0;
    xn = (x <  0.0) ? x : 0.0;
  end

endmodule
