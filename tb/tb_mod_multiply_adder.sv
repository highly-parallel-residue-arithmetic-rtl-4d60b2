// tb_mod_multiply_adder: checks s = |a*x + b*y + c*z|_m with programmable
// coefficients.
//   M = 7  : all 343 coefficient triples, each with 20 random operand codings.
//   M = 59, 83, 97 : random coefficient triples and operand codings
//            (|5^n| = +1, -1, -1).
// Coefficient controls are derived from c = sign * 5^k (mod m) by search.
module tb_mod_multiply_adder;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NM = 4;
  localparam int unsigned MS [NM] = '{7, 59, 83, 97};

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
    sd_t  [N-1:0] x, y, z, s;
    logic [N-1:0] sel_a, sel_b, sel_c;
    logic         neg_a, neg_b, neg_c;

    mod_multiply_adder #(.M(M)) dut (
      .x(x), .y(y), .z(z), .sel_a(sel_a), .sel_b(sel_b), .sel_c(sel_c),
      .neg_a(neg_a), .neg_b(neg_b), .neg_c(neg_c), .s(s));

    task automatic check(input int ca, input int cb, input int cc);
      int dx[MAXN], dy[MAXN], dz[MAXN], ds[MAXN];
      int k;
      bit ng, zr;
      int expv;
      bit range_ok;
      rand_digits(N, dx);
      rand_digits(N, dy);
      rand_digits(N, dz);
      for (int j = 0; j < N; j++) begin
        x[j] = sd_t'(dx[j]); y[j] = sd_t'(dy[j]); z[j] = sd_t'(dz[j]);
      end
      coef_ctrl(ca, int'(M), k, ng, zr); sel_a = zr ? '0 : (N)'(1) << k; neg_a = ng;
      coef_ctrl(cb, int'(M), k, ng, zr); sel_b = zr ? '0 : (N)'(1) << k; neg_b = ng;
      coef_ctrl(cc, int'(M), k, ng, zr); sel_c = zr ? '0 : (N)'(1) << k; neg_c = ng;
      #1;
      for (int j = 0; j < MAXN; j++) ds[j] = (j < N) ? int'(s[j]) : 0;
      range_ok = 1;
      for (int j = 0; j < N; j++) if (ds[j] < -2 || ds[j] > 2) range_ok = 0;
      expv = smod(longint'(ca) * value_of(dx, N, int'(M)) + longint'(cb) * value_of(dy, N, int'(M)) +
                  longint'(cc) * value_of(dz, N, int'(M)), int'(M));
      checks++;
      if (!range_ok || value_of(ds, N, int'(M)) != expv) begin
        failures++;
        if (failures < 10)
          $display("FAIL: m=%0d coefs (%0d,%0d,%0d) expected %0d got %0d", M, ca, cb, cc,
                   expv, value_of(ds, N, int'(M)));
      end
    endtask

    initial begin
      if (M == 7) begin
        for (int ca = -3; ca <= 3; ca++)
          for (int cb = -3; cb <= 3; cb++)
            for (int cc = -3; cc <= 3; cc++)
              for (int t = 0; t < 20; t++) check(ca, cb, cc);
      end else begin
        for (int t = 0; t < 3000; t++)
          check(int'($urandom_range(M - 1, 0)) - int'(N), int'($urandom_range(M - 1, 0)) - int'(N),
                int'($urandom_range(M - 1, 0)) - int'(N));
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
