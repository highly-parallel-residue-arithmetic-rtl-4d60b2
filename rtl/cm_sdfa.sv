// cm_sdfa: behavioural current-level model (not synthesizable logic) of the
// radix-5 signed-digit full adder, built from the current-mode cell models.
//
// The input current z (the wired sum of the addends, nominally -6..6 units)
// enters a bidirectional input stage. Each polarity branch drives a pair of
// threshold detectors at 2.5 units: one switches a 5-unit correction current,
// the other a 1-unit carry current. The outputs are wired sums:
//   c    = [z > 2.5] - [z < -2.5]                      (carry, units)
//   w_n  = -z + 5*[z > 2.5] - 5*[z < -2.5] = -(z - 5c)  (partial sum, inverted)
// so w_n is the partial sum with inverted polarity, as the cell delivers it.
// The negative branch is turned into a positive magnitude, and the detector
// outputs back into negative currents, by unity current mirrors.
// The detector set (TD(2.5,5), TD(2.5,1) per polarity) follows the cell's
// block diagram; the exact wiring is derived here from the SDFA equations.
// Ideal cells: sharp steps at +-2.5, no delay, no level error.
module cm_sdfa (
  input  real z,
  output real w_n,
  output real c
);

  real zp, zn, zn_mag;
  real tdp5, tdp1, tdn5, tdn1;
  real tdn5_neg, tdn1_neg;

  cm_bci u_bci (.x(z), .xp(zp), .xn(zn));

  // magnitude of the negative branch
  cm_current_mirror #(.A(1.0)) u_mir_in (.x(zn), .y(zn_mag));

  cm_threshold_detector #(.T(2.5), .MOUT(5.0)) u_td_p5 (.x(zp),     .y(tdp5));
  cm_threshold_detector #(.T(2.5), .MOUT(1.0)) u_td_p1 (.x(zp),     .y(tdp1));
  cm_threshold_detector #(.T(2.5), .MOUT(5.0)) u_td_n5 (.x(zn_mag), .y(tdn5));
  cm_threshold_detector #(.T(2.5), .MOUT(1.0)) u_td_n1 (.x(zn_mag), .y(tdn1));

  // negative-branch detector currents reversed
  cm_current_mirror #(.A(1.0)) u_mir_n5 (.x(tdn5), .y(tdn5_neg));
  cm_current_mirror #(.A(1.0)) u_mir_n1 (.x(tdn1), .y(tdn1_neg));

  // wired sums at the two output nodes
  always_comb begin
    w_n = -(zp + zn) + tdp5 + tdn5_neg;
    c   = tdp1 + tdn1_neg;
  end

endmodule
