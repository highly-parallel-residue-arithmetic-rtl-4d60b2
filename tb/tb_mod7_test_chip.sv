// tb_mod7_test_chip: checks the three independent parts of the mod 7 test chip.
//   - stand-alone SDFA: transfer over z = -6..6 (carry and partial sum)
//   - stand-alone decoder: transfer over s' = -3..3
//   - multiply adder: 20000 random operand codings against |2x + 3y - 2z|_7
module tb_mod7_test_chip;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  sd_t [2:0] ma_x, ma_y, ma_z, ma_s;
  lsum_t     sdfa_z;
  sd_t       sdfa_w;
  tri_t      sdfa_c;
  ssum_t     dec_sp;
  tri_t      dec_q, dec_qp;

  mod7_test_chip dut (
    .ma_x(ma_x), .ma_y(ma_y), .ma_z(ma_z), .ma_s(ma_s),
    .sdfa_z(sdfa_z), .sdfa_w(sdfa_w), .sdfa_c(sdfa_c),
    .dec_sp(dec_sp), .dec_q(dec_q), .dec_qp(dec_qp));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec, sgn, mag;
    int dx[MAXN], dy[MAXN], dz[MAXN], ds[MAXN];
    int expv;
    ma_x = '0; ma_y = '0; ma_z = '0; sdfa_z = '0; dec_sp = '0;
    for (int v = -6; v <= 6; v++) begin
      sdfa_z = lsum_t'(v);
      #1;
      ec = (v > 2) ? 1 : (v < -2) ? -1 : 0;
      checks++;
      if (int'(sdfa_c) != ec || int'(sdfa_w) != v - 5 * ec) begin
        failures++;
        $display("FAIL: SDFA z=%0d c=%0d w=%0d", v, sdfa_c, sdfa_w);
      end
    end
    for (int v = -3; v <= 3; v++) begin
      dec_sp = ssum_t'(v);
      #1;
      sgn = (v < 0) ? -1 : 1;
      mag = (v < 0) ? -v : v;
      checks++;
      if (int'(dec_q) != sgn * (mag % 2) || int'(dec_qp) != sgn * (mag / 2)) begin
        failures++;
        $display("FAIL: decoder s'=%0d q=%0d q'=%0d", v, dec_q, dec_qp);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      rand_digits(3, dx);
      rand_digits(3, dy);
      rand_digits(3, dz);
      for (int j = 0; j < 3; j++) begin
        ma_x[j] = sd_t'(dx[j]); ma_y[j] = sd_t'(dy[j]); ma_z[j] = sd_t'(dz[j]);
      end
      #1;
      for (int j = 0; j < MAXN; j++) ds[j] = (j < 3) ? int'(ma_s[j]) : 0;
      expv = smod(2 * value_of(dx, 3, 7) + 3 * value_of(dy, 3, 7) - 2 * value_of(dz, 3, 7), 7);
      checks++;
      if (value_of(ds, 3, 7) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL: multiply adder expected %0d got %0d", expv, value_of(ds, 3, 7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
