// tb_mod_multiplier: checks the barrel-shifter multiplier for three moduli.
//   M = 7  : every multiplicand coding (125) times every coefficient -3..3.
//   M = 11 : |5^5|_11 = +1 (wrap without inversion), random multiplicands.
//   M = 83 : 41 digits, |5^41|_83 = -1, random multiplicands.
// The product's value (sum of digits times powers of 5, mod m) must equal
// c * value(x) mod m, and each product digit must stay in {-2..2}.
// For M = 7 the mod 7 multiplication table is also checked digit for digit:
// a multiplicand 5^j (a single +1 digit) times c must give exactly the single
// digit +-1 at the position of the power +-5^k that equals c * 5^j.
module tb_mod_multiplier;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NM = 3;
  localparam int unsigned MS [NM] = '{7, 11, 83};

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
    sd_t  [N-1:0] x, p;
    logic [N-1:0] sel;
    logic         neg;

    mod_multiplier #(.M(M)) dut (.x(x), .sel(sel), .neg(neg), .p(p));

    initial begin
      int d[MAXN], pd[MAXN];
      int k;
      bit cneg, czero;
      int nvec;
      bit range_ok;
      nvec = (M == 7) ? 125 : 40;
      for (int c = -int'(N); c <= int'(N); c++) begin
        for (int t = 0; t < nvec; t++) begin
          if (M == 7) begin
            // enumerate all 125 codings
            d[0] = t % 5 - 2; d[1] = (t / 5) % 5 - 2; d[2] = t / 25 - 2;
          end else begin
            rand_digits(N, d);
          end
          coef_ctrl(c, int'(M), k, cneg, czero);
          for (int j = 0; j < N; j++) x[j] = sd_t'(d[j]);
          sel = czero ? '0 : (N)'(1) << k;
          neg = cneg;
          #1;
          range_ok = 1;
          for (int j = 0; j < MAXN; j++) pd[j] = 0;
          for (int j = 0; j < N; j++) begin
            pd[j] = int'(p[j]);
            if (pd[j] < -2 || pd[j] > 2) range_ok = 0;
          end
          checks++;
          if (!range_ok || value_of(pd, N, int'(M)) != smod(longint'(c) * value_of(d, N, int'(M)), int'(M))) begin
            failures++;
            if (failures < 10)
              $display("FAIL: m=%0d c=%0d x=%0d product value %0d", M, c,
                       value_of(d, N, int'(M)), value_of(pd, N, int'(M)));
          end
        end
      end
      if (M == 7) begin
        // table rows: multiplicand 5^j; columns: c = -3,-2,-1,1,2,3;
        // entries: signed position code, +-(k+1) for +-5^k
        int tbl [3][6];
        int cols [6];
        cols = '{-3, -2, -1, 1, 2, 3};
        tbl[0] = '{ 3,  2, -1,  1, -2, -3};
        tbl[1] = '{-1,  3, -2,  2, -3,  1};
        tbl[2] = '{-2, -1, -3,  3,  1,  2};
        for (int j = 0; j < 3; j++) begin
          for (int ci = 0; ci < 6; ci++) begin
            for (int i = 0; i < N; i++) x[i] = (i == j) ? 3'sd1 : 3'sd0;
            coef_ctrl(cols[ci], 7, k, cneg, czero);
            sel = (N)'(1) << k;
            neg = cneg;
            #1;
            for (int i = 0; i < N; i++) begin
              int e;
              e = (i == ((tbl[j][ci] > 0 ? tbl[j][ci] : -tbl[j][ci]) - 1)) ?
                  ((tbl[j][ci] > 0) ? 1 : -1) : 0;
              checks++;
              if (int'(p[i]) != e) begin
                failures++;
                $display("FAIL: table: 5^%0d * %0d digit %0d = %0d, expected %0d", j,
                         cols[ci], i, p[i], e);
              end
            end
          end
        end
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
