// cm_threshold_detector: behavioural model (not synthesizable logic) of the
// current-mode threshold detector TD(T, m).
//
// The output current is MOUT when the input current exceeds the threshold T,
// and 0 otherwise (y = 0 for x <= T). Thresholds sit half-way between the
// integer current levels (1.5, 2.5, ...) so that the cell tolerates level
// errors of up to half a unit. Currents are real numbers in units of the unit
// current. The comparison switches a current source of size MOUT on or off,
// as in the cell, where the threshold and the output are both set by current
// sources. The switching edge is ideal (no slope, no delay).
module cm_threshold_detector #(
  parameter real T    = 2.5,
  parameter real MOUT = 1.0
) (
  input  real x,
  output real y
);

  logic src_off;

  always_comb src_off = !(x > T);

  cm_current_source #(.MOUT(MOUT)) u_src (.xn(src_off), .y(y));

endmodule
