// cm_decoder: behavioural current-level model (not synthesizable logic) of the
// three-operand decoder, built from the current-mode cell models.
//
// The input current s' (nominally -3..3 units) enters a bidirectional input
// stage. Each polarity branch drives three detectors on the magnitude:
//   MTD(0.5, 1.5 : 1)  level 1       -> q
//   TD(2.5, 1)         level 3       -> q
//   TD(1.5, 1)         level 2 or 3  -> q'
// The negative branch is mirrored to a magnitude first and its outputs are
// mirrored back to negative currents, so
//   q  = sgn(s') * ([0.5 <= |s'| <= 1.5] + [|s'| > 2.5])
//   q' = sgn(s') *  [|s'| > 1.5]
// and s' = q + 2 q' at every integer level. The outputs are re-quantized to
// whole units, which restores levels that the SDFA does not. The detector set
// follows the decoder's block diagram; the wiring is derived from the decoder
// equation. Ideal cells, no delay.
module cm_decoder (
  input  real sp,
  output real q,
  output real qp
);

  real sp_p, sp_n, sp_nmag;
  real mtd_p, td3_p, td2_p, mtd_n, td3_n, td2_n;
  real q_n, qp_n;

  cm_bci u_bci (.x(sp), .xp(sp_p), .xn(sp_n));
  cm_current_mirror #(.A(1.0)) u_mir_in (.x(sp_n), .y(sp_nmag));

  cm_mtd                #(.T1(0.5), .T2(1.5), .MOUT(1.0)) u_mtd_p (.x(sp_p),    .y(mtd_p));
  cm_threshold_detector #(.T(2.5), .MOUT(1.0))            u_td3_p (.x(sp_p),    .y(td3_p));
  cm_threshold_detector #(.T(1.5), .MOUT(1.0))            u_td2_p (.x(sp_p),    .y(td2_p));
  cm_mtd                #(.T1(0.5), .T2(1.5), .MOUT(1.0)) u_mtd_n (.x(sp_nmag), .y(mtd_n));
  cm_threshold_detector #(.T(2.5), .MOUT(1.0))            u_td3_n (.x(sp_nmag), .y(td3_n));
  cm_threshold_detector #(.T(1.5), .MOUT(1.0))            u_td2_n (.x(sp_nmag), .y(td2_n));

  // negative-branch results reversed (mirror with the wired sum as input)
  cm_current_mirror #(.A(1.0)) u_mir_q  (.x(mtd_n + td3_n), .y(q_n));
  cm_current_mirror #(.A(1.0)) u_mir_qp (.x(td2_n),         .y(qp_n));

  always_comb begin
    q  = mtd_p + td3_p + q_n;
    qp = td2_p + qp_n;
  end

endmodule
