// tb_rns_multiply_adder: checks the 13-modulus RNS multiply adder per modulus.
// Each vector draws, for every modulus independently, random operand codings
// and random coefficients (zero included); every modulus's result value must
// equal a*x + b*y + c*z mod m_i, with every result digit in {-2..2}.
module tb_rns_multiply_adder;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NMOD = 13;
  localparam int unsigned MS [NMOD] = '{7, 11, 17, 19, 23, 37, 43, 47, 53, 59, 73, 79, 83};
  localparam int TD = 269;
  localparam int NVEC = 2000;

  int checks = 0;
  int failures = 0;

  sd_t  [TD-1:0] x, y, z, s;
  logic [TD-1:0] sel_a, sel_b, sel_c;
  logic [NMOD-1:0] neg_a, neg_b, neg_c;

  rns_multiply_adder dut (
    .x(x), .y(y), .z(z), .sel_a(sel_a), .sel_b(sel_b), .sel_c(sel_c),
    .neg_a(neg_a), .neg_b(neg_b), .neg_c(neg_c), .s(s));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx[NMOD][MAXN], dy[NMOD][MAXN], dz[NMOD][MAXN], ds[MAXN];
    int ca[NMOD], cb[NMOD], cc[NMOD];
    int off, n, m, k, expv;
    bit ng, zr, range_ok;
    for (int t = 0; t < NVEC; t++) begin
      off = 0;
      for (int i = 0; i < NMOD; i++) begin
        m = int'(MS[i]);
        n = (m - 1) / 2;
        rand_digits(n, dx[i]);
        rand_digits(n, dy[i]);
        rand_digits(n, dz[i]);
        ca[i] = int'($urandom_range(m - 1, 0)) - n;
        cb[i] = int'($urandom_range(m - 1, 0)) - n;
        cc[i] = int'($urandom_range(m - 1, 0)) - n;
        for (int j = 0; j < n; j++) begin
          x[off+j] = sd_t'(dx[i][j]); y[off+j] = sd_t'(dy[i][j]); z[off+j] = sd_t'(dz[i][j]);
          sel_a[off+j] = 1'b0; sel_b[off+j] = 1'b0; sel_c[off+j] = 1'b0;
        end
        coef_ctrl(ca[i], m, k, ng, zr); if (!zr) sel_a[off+k] = 1'b1; neg_a[i] = ng;
        coef_ctrl(cb[i], m, k, ng, zr); if (!zr) sel_b[off+k] = 1'b1; neg_b[i] = ng;
        coef_ctrl(cc[i], m, k, ng, zr); if (!zr) sel_c[off+k] = 1'b1; neg_c[i] = ng;
        off += n;
      end
      #1;
      off = 0;
      for (int i = 0; i < NMOD; i++) begin
        m = int'(MS[i]);
        n = (m - 1) / 2;
        range_ok = 1;
        for (int j = 0; j < MAXN; j++) ds[j] = (j < n) ? int'(s[off+j]) : 0;
        for (int j = 0; j < n; j++) if (ds[j] < -2 || ds[j] > 2) range_ok = 0;
        expv = smod(longint'(ca[i]) * value_of(dx[i], n, m) + longint'(cb[i]) * value_of(dy[i], n, m) +
                    longint'(cc[i]) * value_of(dz[i], n, m), m);
        checks++;
        if (!range_ok || value_of(ds, n, m) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL: vector %0d modulus %0d expected %0d got %0d", t, m,
                                      expv, value_of(ds, n, m));
        end
        off += n;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
