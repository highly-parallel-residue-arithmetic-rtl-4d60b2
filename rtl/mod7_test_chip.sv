// mod7_test_chip: the contents of the fabricated test chip, each with its own pins.
//
//   - a mod 7 three-operand multiply adder, s = |2x + 3y - 2z|_7
//   - a stand-alone radix-5 SDFA (linear sum in, partial sum and carry out)
//   - a stand-alone decoder (s' in, q and q' out)
// The two stand-alone cells exist so that their transfer characteristics can
// be measured on their own; they share nothing with the multiply adder.
// Purely combinational.
module mod7_test_chip
  import rns_pkg::*;
(
  input  sd_t [2:0] ma_x,
  input  sd_t [2:0] ma_y,
  input  sd_t [2:0] ma_z,
  output sd_t [2:0] ma_s,
  input  lsum_t     sdfa_z,
  output sd_t       sdfa_w,
  output tri_t      sdfa_c,
  input  ssum_t     dec_sp,
  output tri_t      dec_q,
  output tri_t      dec_qp
);

  mod7_multiply_adder u_ma (.x(ma_x), .y(ma_y), .z(ma_z), .s(ma_s));

  r5_sdfa u_sdfa (.z(sdfa_z), .w(sdfa_w), .c(sdfa_c));

  sd_decoder u_dec (.sp(dec_sp), .q(dec_q), .qp(dec_qp));

endmodule
