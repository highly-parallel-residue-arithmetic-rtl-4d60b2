// cm_mtd: behavioural model (not synthesizable logic) of the modified threshold
// detector MTD(T1, T2 : m), a window comparator on a current.
//
// The output current is MOUT when T1 <= x <= T2, and 0 otherwise. In the
// decoder it picks out the input level 1 (window 0.5..1.5). Currents are real
// numbers in units of the unit current. The window test switches a current
// source of size MOUT, as in the cell, where T1, T2 and m are all current
// sources. Ideal edges, no delay.
module cm_mtd #(
  parameter real T1   = 0.5,
  parameter real T2   = 1.5,
  parameter real MOUT = 1.0
) (
  input  real x,
  output real y
);

  logic src_off;

  always_comb src_off = !(x >= T1 && x <= T2);

  cm_current_source #(.MOUT(MOUT)) u_src (.xn(src_off), .y(y));

endmodule
