// tb_mod_three_operand_adder: checks mod m three-operand addition.
//   M = 7  : a directed case whose intermediate sums are s' = (3, -2, 3),
//            which must come out as the exact digits (2, -1, 2); then random
//            operand codings.
//   M = 11, 19, 83 : random codings (wrap sign +1, +1, -1).
// The sum's value must be a + b + c mod m and every sum digit in {-2..2}.
module tb_mod_three_operand_adder;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NM = 4;
  localparam int unsigned MS [NM] = '{7, 11, 19, 83};
  localparam int NVEC = 20000;

  int checks = 0;
  int failures = 0;
  bit [NM-1:0] done = '0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NM; g++) begin : g_m
    localparam int unsigned M = MS[g];
    localparam int N = (M - 1) / 2;
    sd_t [N-1:0] a, b, c, s;

    mod_three_operand_adder #(.M(M)) dut (.a(a), .b(b), .c(c), .s(s));

    task automatic check(input int da[MAXN], input int db[MAXN], input int dc[MAXN]);
      int sd[MAXN];
      bit range_ok;
      int expv;
      for (int j = 0; j < N; j++) begin
        a[j] = sd_t'(da[j]); b[j] = sd_t'(db[j]); c[j] = sd_t'(dc[j]);
      end
      #1;
      range_ok = 1;
      for (int j = 0; j < MAXN; j++) sd[j] = (j < N) ? int'(s[j]) : 0;
      for (int j = 0; j < N; j++) if (sd[j] < -2 || sd[j] > 2) range_ok = 0;
      expv = smod(longint'(value_of(da, N, int'(M))) + value_of(db, N, int'(M)) +
                  value_of(dc, N, int'(M)), int'(M));
      checks++;
      if (!range_ok || value_of(sd, N, int'(M)) != expv) begin
        failures++;
        if (failures < 10)
          $display("FAIL: m=%0d expected %0d got %0d (range ok %0d)", M, expv,
                   value_of(sd, N, int'(M)), range_ok);
      end
    endtask

    initial begin
      int da[MAXN], db[MAXN], dc[MAXN];
      if (M == 7) begin
        // Linear sums (z2, z1, z0) = (-3, 3, 2): carries c0 = 0, c1 = +1,
        // c2 = -1, partial sums w = (2, -2, 2), so s' = (3, -2, 3).
        for (int j = 0; j < MAXN; j++) begin da[j] = 0; db[j] = 0; dc[j] = 0; end
        da[0] = 2;  da[1] = 2; da[2] = -2;
        db[0] = 0;  db[1] = 1; db[2] = -1;
        check(da, db, dc);
        checks++;
        if (int'(s[2]) != 2 || int'(s[1]) != -1 || int'(s[0]) != 2) begin
          failures++;
          $display("FAIL: directed case gave (%0d, %0d, %0d), expected (2, -1, 2)",
                   s[2], s[1], s[0]);
        end
      end
      for (int t = 0; t < NVEC; t++) begin
        rand_digits(N, da);
        rand_digits(N, db);
        rand_digits(N, dc);
        check(da, db, dc);
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
