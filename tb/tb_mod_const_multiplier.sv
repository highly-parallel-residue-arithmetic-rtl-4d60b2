// tb_mod_const_multiplier: checks the wired constant multiplier.
// Every coefficient -3..3 at M = 7 against all 125 multiplicand codings, and
// coefficients 5 and -9 at M = 19 (|5^9|_19 = +1) against random codings.
// The product value must be COEF * value(x) mod m.
module tb_mod_const_multiplier;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NC = 9;
  localparam int unsigned MS [NC] = '{7, 7, 7, 7, 7, 7, 7, 19, 19};
  localparam int          CS [NC] = '{-3, -2, -1, 0, 1, 2, 3, 5, -9};

  int checks = 0;
  int failures = 0;
  bit [NC-1:0] done = '0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NC; g++) begin : g_c
    localparam int unsigned M = MS[g];
    localparam int N = (M - 1) / 2;
    localparam int COEF = CS[g];
    sd_t [N-1:0] x, p;

    mod_const_multiplier #(.M(M), .COEF(COEF)) dut (.x(x), .p(p));

    initial begin
      int d[MAXN], pd[MAXN];
      int nvec;
      nvec = (M == 7) ? 125 : 200;
      for (int t = 0; t < nvec; t++) begin
        if (M == 7) begin
          d[0] = t % 5 - 2; d[1] = (t / 5) % 5 - 2; d[2] = t / 25 - 2;
        end else begin
          rand_digits(N, d);
        end
        for (int j = 0; j < N; j++) x[j] = sd_t'(d[j]);
        #1;
        for (int j = 0; j < MAXN; j++) pd[j] = (j < N) ? int'(p[j]) : 0;
        checks++;
        if (value_of(pd, N, int'(M)) != smod(longint'(COEF) * value_of(d, N, int'(M)), int'(M))) begin
          failures++;
          if (failures < 10)
            $display("FAIL: m=%0d coef=%0d x=%0d product %0d", M, COEF,
                     value_of(d, N, int'(M)), value_of(pd, N, int'(M)));
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
