// cm_current_mirror: behavioural model (not synthesizable logic) of a current
// mirror, the cell that copies, scales and reverses a current.
//
// The output is y = -A * x: a copy of the input current scaled by the factor A
// and flowing in the opposite direction. A mirror with several outputs is
// several instances sharing one input. N-channel and P-channel mirrors differ
// only in the polarity of current they can carry; this model does not limit
// the polarity. Currents are real numbers in units of the unit current.
// No timing.
module cm_current_mirror #(
  parameter real A = 1.0
) (
  input  real x,
  output real y
);

  always_comb y = -A * x;

endmodule
