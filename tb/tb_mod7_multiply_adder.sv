// tb_mod7_multiply_adder: exhaustive check of s = |2x + 3y - 2z|_7.
// All 125^3 combinations of operand codings are applied; the result value
// must match and every result digit must lie in {-2..2}.
module tb_mod7_multiply_adder;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  sd_t [2:0] x, y, z, s;

  mod7_multiply_adder dut (.x(x), .y(y), .z(z), .s(s));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void unpack125(int t, output int d[MAXN]);
    for (int j = 0; j < MAXN; j++) d[j] = 0;
    d[0] = t % 5 - 2; d[1] = (t / 5) % 5 - 2; d[2] = t / 25 - 2;
  endfunction

  initial begin
    int dx[MAXN], dy[MAXN], dz[MAXN], ds[MAXN];
    int expv;
    bit range_ok;
    for (int tx = 0; tx < 125; tx++) begin
      unpack125(tx, dx);
      for (int ty = 0; ty < 125; ty++) begin
        unpack125(ty, dy);
        for (int tz = 0; tz < 125; tz++) begin
          unpack125(tz, dz);
          for (int j = 0; j < 3; j++) begin
            x[j] = sd_t'(dx[j]); y[j] = sd_t'(dy[j]); z[j] = sd_t'(dz[j]);
          end
          #1;
          for (int j = 0; j < MAXN; j++) ds[j] = (j < 3) ? int'(s[j]) : 0;
          range_ok = 1;
          for (int j = 0; j < 3; j++) if (ds[j] < -2 || ds[j] > 2) range_ok = 0;
          expv = smod(2 * value_of(dx, 3, 7) + 3 * value_of(dy, 3, 7) - 2 * value_of(dz, 3, 7), 7);
          checks++;
          if (!range_ok || value_of(ds, 3, 7) != expv) begin
            failures++;
            if (failures < 10)
              $display("FAIL: x=%0d y=%0d z=%0d expected %0d got %0d", value_of(dx, 3, 7),
                       value_of(dy, 3, 7), value_of(dz, 3, 7), expv, value_of(ds, 3, 7));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
