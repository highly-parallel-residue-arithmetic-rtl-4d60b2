// rns_top: the residue arithmetic design at full size.
//
// Two independent parts stand side by side:
//   - the mod 7 test chip (a fixed-coefficient mod 7 three-operand multiply
//     adder, s = |2x + 3y - 2z|_7, plus a stand-alone SDFA and decoder), and
//   - the full-width RNS three-operand multiply adder over 13 moduli with
//     programmable coefficients, built from the same cells.
//   - current-level behavioural models of the two stand-alone test cells (SDFA
//     and decoder), with real-valued currents in units of the unit current.
//     They are for reproducing the cells' current-transfer curves and are not
//     synthesizable; they share nothing with the other two parts.
// Ports are brought out unchanged from each part; see those modules for the
// digit coding and layout. Purely combinational.
module rns_top
  import rns_pkg::*;
(
  // mod 7 test chip
  input  sd_t  [2:0] chip_x,
  input  sd_t  [2:0] chip_y,
  input  sd_t  [2:0] chip_z,
  output sd_t  [2:0] chip_s,
  input  lsum_t      chip_sdfa_z,
  output sd_t        chip_sdfa_w,
  output tri_t       chip_sdfa_c,
  input  ssum_t      chip_dec_sp,
  output tri_t       chip_dec_q,
  output tri_t       chip_dec_qp,
  // RNS multiply adder
  input  sd_t  [total_digits(DEFAULT_MODULI)-1:0] rns_x,
  input  sd_t  [total_digits(DEFAULT_MODULI)-1:0] rns_y,
  input  sd_t  [total_digits(DEFAULT_MODULI)-1:0] rns_z,
  input  logic [total_digits(DEFAULT_MODULI)-1:0] rns_sel_a,
  input  logic [total_digits(DEFAULT_MODULI)-1:0] rns_sel_b,
  input  logic [total_digits(DEFAULT_MODULI)-1:0] rns_sel_c,
  input  logic [NUM_MODULI-1:0]                   rns_neg_a,
  input  logic [NUM_MODULI-1:0]                   rns_neg_b,
  input  logic [NUM_MODULI-1:0]                   rns_neg_c,
  output sd_t  [total_digits(DEFAULT_MODULI)-1:0] rns_s,
  // current-level models of the stand-alone test cells
  input  real        cm_sdfa_z,
  output real        cm_sdfa_w_n,
  output real        cm_sdfa_c,
  input  real        cm_dec_sp,
  output real        cm_dec_q,
  output real        cm_dec_qp
);

  mod7_test_chip u_chip (
    .ma_x  (chip_x),
    .ma_y  (chip_y),
    .ma_z  (chip_z),
    .ma_s  (chip_s),
    .sdfa_z(chip_sdfa_z),
    .sdfa_w(chip_sdfa_w),
    .sdfa_c(chip_sdfa_c),
    .dec_sp(chip_dec_sp),
    .dec_q (chip_dec_q),
    .dec_qp(chip_dec_qp)
  );

  rns_multiply_adder u_rns (
    .x    (rns_x),
    .y    (rns_y),
    .z    (rns_z),
    .sel_a(rns_sel_a),
    .sel_b(rns_sel_b),
    .sel_c(rns_sel_c),
    .neg_a(rns_neg_a),
    .neg_b(rns_neg_b),
    .neg_c(rns_neg_c),
    .s    (rns_s)
  );

  cm_sdfa u_cm_sdfa (.z(cm_sdfa_z), .w_n(cm_sdfa_w_n), .c(cm_sdfa_c));

  cm_decoder u_cm_dec (.sp(cm_dec_sp), .q(cm_dec_q), .qp(cm_dec_qp));

endmodule
