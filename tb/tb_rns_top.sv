// tb_rns_top: end-to-end test of the whole design at its default size.
//
// RNS part: computes S = A*X + B*Y + C*Z for random signed 32-bit integers
// (plus directed corner cases). The testbench converts each integer to
// symmetric residues and picks a random redundant coding of each; coefficients
// become shift/sign controls. The result digit vectors are decoded to residues
// and reassembled into an integer by the Chinese remainder theorem; that
// integer must equal S exactly (|S| < 2^63.6 fits the 65.8-bit range).
//
// Mechanism coverage, counted from a digit-level model of the operands:
// positive and negative SDFA carries, end-around carries on moduli with
// |5^n| = -1 and +1, routed decoder q' outputs, multiplicand digits wrapping
// around the barrel shifter, negative and zero coefficients. Each must occur.
//
// Chip part: the fixed mod 7 multiply adder against |2x + 3y - 2z|_7, and the
// stand-alone SDFA and decoder over their full input ranges. The current-level
// models of the same two cells are driven with the same levels (as currents)
// and must agree with the digit-level cells.
module tb_rns_top;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  localparam int NMOD = 13;
  localparam int unsigned MS [NMOD] = '{7, 11, 17, 19, 23, 37, 43, 47, 53, 59, 73, 79, 83};
  localparam int TD = 269;
  localparam int NVEC = 1000;

  int checks = 0;
  int failures = 0;

  sd_t  [2:0] chip_x, chip_y, chip_z, chip_s;
  lsum_t      chip_sdfa_z;
  sd_t        chip_sdfa_w;
  tri_t       chip_sdfa_c;
  ssum_t      chip_dec_sp;
  tri_t       chip_dec_q, chip_dec_qp;
  sd_t  [TD-1:0] rns_x, rns_y, rns_z, rns_s;
  logic [TD-1:0] rns_sel_a, rns_sel_b, rns_sel_c;
  logic [NMOD-1:0] rns_neg_a, rns_neg_b, rns_neg_c;
  real        cm_sdfa_z, cm_sdfa_w_n, cm_sdfa_c, cm_dec_sp, cm_dec_q, cm_dec_qp;

  rns_top dut (.*);

  // mechanism counters
  typedef enum int {
    EV_CARRY_POS, EV_CARRY_NEG, EV_EAC_INV, EV_EAC_PLAIN, EV_QP_ROUTED,
    EV_SHIFT_WRAP, EV_COEF_NEG, EV_COEF_ZERO, EV_NUM
  } ev_e;
  int ev [EV_NUM];
  string ev_name [EV_NUM] = '{"positive carry", "negative carry", "end-around carry (inverted)",
                             "end-around carry (plain)", "decoder q' routed", "shifter wrap-around",
                             "negative coefficient", "zero coefficient"};

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Digit-level product model: rotate by k, wrapped digits times 5^n mod m.
  function automatic void model_mul(int d[MAXN], int n, int m, int k, bit neg, bit zero,
                                    output int p[MAXN]);
    int ws;
    ws = p5(n, m);
    for (int j = 0; j < MAXN; j++) p[j] = 0;
    if (!zero) begin
      for (int j = 0; j < n; j++) begin
        p[j] = (j >= k) ? d[j-k] : ws * d[j-k+n];
        if (neg) p[j] = -p[j];
      end
      if (k > 0)
        for (int j = n - k; j < n; j++) if (d[j] != 0) ev[EV_SHIFT_WRAP]++;
    end
  endfunction

  // Count carries, end-around carries and q' routing for one modulus.
  function automatic void model_add(int pa[MAXN], int pb[MAXN], int pc[MAXN], int n, int m);
    int zz, c[MAXN], w[MAXN], sp, cin;
    for (int j = 0; j < n; j++) begin
      zz = pa[j] + pb[j] + pc[j];
      c[j] = (zz > 2) ? 1 : (zz < -2) ? -1 : 0;
      w[j] = zz - 5 * c[j];
      if (c[j] > 0) ev[EV_CARRY_POS]++;
      if (c[j] < 0) ev[EV_CARRY_NEG]++;
    end
    if (c[n-1] != 0) begin
      if (p5(n, m) < 0) ev[EV_EAC_INV]++; else ev[EV_EAC_PLAIN]++;
    end
    for (int j = 0; j < n; j++) begin
      cin = (j == 0) ? p5(n, m) * c[n-1] : c[j-1];
      sp = w[j] + cin;
      if (sp >= 2 || sp <= -2) ev[EV_QP_ROUTED]++;
    end
  endfunction

  function automatic int inv_mod(longint a, int m);
    for (int i = 1; i < m; i++) if ((a * i) % m == 1) return i;
    return 0;
  endfunction

  task automatic rns_vector(input longint A, input longint X, input longint B, input longint Y,
                            input longint C, input longint Z);
    int dx[MAXN], dy[MAXN], dz[MAXN], pa[MAXN], pb[MAXN], pc[MAXN], ds[MAXN];
    int off, n, m, k, r, ca, cb, cc, expv;
    bit ng, zr, ok;
    logic [127:0] bigm, mi, acc, term;
    logic signed [127:0] expect_s, got_s;
    off = 0;
    for (int i = 0; i < NMOD; i++) begin
      m = int'(MS[i]);
      n = (m - 1) / 2;
      encode(smod(X, m), n, m, dx);
      encode(smod(Y, m), n, m, dy);
      encode(smod(Z, m), n, m, dz);
      ca = smod(A, m); cb = smod(B, m); cc = smod(C, m);
      for (int j = 0; j < n; j++) begin
        rns_x[off+j] = sd_t'(dx[j]); rns_y[off+j] = sd_t'(dy[j]); rns_z[off+j] = sd_t'(dz[j]);
        rns_sel_a[off+j] = 1'b0; rns_sel_b[off+j] = 1'b0; rns_sel_c[off+j] = 1'b0;
      end
      coef_ctrl(ca, m, k, ng, zr); if (!zr) rns_sel_a[off+k] = 1'b1; rns_neg_a[i] = ng;
      if (zr) ev[EV_COEF_ZERO]++; if (ng) ev[EV_COEF_NEG]++;
      model_mul(dx, n, m, k, ng, zr, pa);
      coef_ctrl(cb, m, k, ng, zr); if (!zr) rns_sel_b[off+k] = 1'b1; rns_neg_b[i] = ng;
      if (zr) ev[EV_COEF_ZERO]++; if (ng) ev[EV_COEF_NEG]++;
      model_mul(dy, n, m, k, ng, zr, pb);
      coef_ctrl(cc, m, k, ng, zr); if (!zr) rns_sel_c[off+k] = 1'b1; rns_neg_c[i] = ng;
      if (zr) ev[EV_COEF_ZERO]++; if (ng) ev[EV_COEF_NEG]++;
      model_mul(dz, n, m, k, ng, zr, pc);
      model_add(pa, pb, pc, n, m);
      off += n;
    end
    #1;
    // per-modulus residues, and CRT reconstruction
    bigm = 128'd1;
    for (int i = 0; i < NMOD; i++) bigm = bigm * 128'(MS[i]);
    acc = '0;
    off = 0;
    ok = 1;
    for (int i = 0; i < NMOD; i++) begin
      m = int'(MS[i]);
      n = (m - 1) / 2;
      for (int j = 0; j < MAXN; j++) ds[j] = (j < n) ? int'(rns_s[off+j]) : 0;
      for (int j = 0; j < n; j++) if (ds[j] < -2 || ds[j] > 2) ok = 0;
      r = value_of(ds, n, m);
      expv = smod(longint'(smod(A, m)) * smod(X, m) + longint'(smod(B, m)) * smod(Y, m) +
                  longint'(smod(C, m)) * smod(Z, m), m);
      if (r != expv) ok = 0;
      if (r < 0) r += m;
      mi = bigm / 128'(m);
      term = (mi * 128'(inv_mod(longint'(mi % 128'(m)), m)) % bigm) * 128'(r) % bigm;
      acc = (acc + term) % bigm;
      off += n;
    end
    got_s = (acc > bigm / 2) ? $signed(acc - bigm) : $signed(acc);
    expect_s = 128'(A) * 128'(X) + 128'(B) * 128'(Y) + 128'(C) * 128'(Z);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: residue mismatch or digit out of range");
    end
    checks++;
    if (got_s != expect_s) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d*%0d + %0d*%0d + %0d*%0d = %0d, design gave %0d",
                                  A, X, B, Y, C, Z, expect_s, got_s);
    end
  endtask

  function automatic longint rand32();
    return longint'($signed($urandom()));
  endfunction

  initial begin
    int dx[MAXN], dy[MAXN], dz[MAXN], ds[MAXN];
    int ec, sgn, mag, expv;
    for (int e = 0; e < EV_NUM; e++) ev[e] = 0;
    chip_x = '0; chip_y = '0; chip_z = '0; chip_sdfa_z = '0; chip_dec_sp = '0;
    cm_sdfa_z = 0.0; cm_dec_sp = 0.0;
    rns_x = '0; rns_y = '0; rns_z = '0;
    rns_sel_a = '0; rns_sel_b = '0; rns_sel_c = '0;
    rns_neg_a = '0; rns_neg_b = '0; rns_neg_c = '0;

    // ---- chip part ----
    for (int v = -6; v <= 6; v++) begin
      chip_sdfa_z = lsum_t'(v);
      cm_sdfa_z = real'(v);
      #1;
      checks++;
      if (cm_sdfa_c != real'(chip_sdfa_c) || cm_sdfa_w_n != -real'(chip_sdfa_w)) begin
        failures++;
        $display("FAIL: current-level SDFA disagrees at z=%0d: c=%f -w=%f", v, cm_sdfa_c, cm_sdfa_w_n);
      end
      ec = (v > 2) ? 1 : (v < -2) ? -1 : 0;
      checks++;
      if (int'(chip_sdfa_c) != ec || int'(chip_sdfa_w) != v - 5 * ec) begin
        failures++;
        $display("FAIL: chip SDFA z=%0d", v);
      end
    end
    for (int v = -3; v <= 3; v++) begin
      chip_dec_sp = ssum_t'(v);
      cm_dec_sp = real'(v);
      #1;
      checks++;
      if (cm_dec_q != real'(chip_dec_q) || cm_dec_qp != real'(chip_dec_qp)) begin
        failures++;
        $display("FAIL: current-level decoder disagrees at s'=%0d: q=%f q'=%f", v, cm_dec_q, cm_dec_qp);
      end
      sgn = (v < 0) ? -1 : 1;
      mag = (v < 0) ? -v : v;
      checks++;
      if (int'(chip_dec_q) != sgn * (mag % 2) || int'(chip_dec_qp) != sgn * (mag / 2)) begin
        failures++;
        $display("FAIL: chip decoder s'=%0d", v);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      rand_digits(3, dx);
      rand_digits(3, dy);
      rand_digits(3, dz);
      for (int j = 0; j < 3; j++) begin
        chip_x[j] = sd_t'(dx[j]); chip_y[j] = sd_t'(dy[j]); chip_z[j] = sd_t'(dz[j]);
      end
      #1;
      for (int j = 0; j < MAXN; j++) ds[j] = (j < 3) ? int'(chip_s[j]) : 0;
      expv = smod(2 * value_of(dx, 3, 7) + 3 * value_of(dy, 3, 7) - 2 * value_of(dz, 3, 7), 7);
      checks++;
      if (value_of(ds, 3, 7) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL: chip multiply adder expected %0d", expv);
      end
    end

    // ---- RNS part: 32 x 32-bit three-operand multiply-add ----
    rns_vector(0, 0, 0, 0, 0, 0);
    rns_vector(-2147483648, -2147483648, -2147483648, -2147483648, -2147483648, -2147483648);
    rns_vector(2147483647, 2147483647, 2147483647, 2147483647, 2147483647, 2147483647);
    rns_vector(2147483647, -2147483648, 1, -1, 0, 12345);
    rns_vector(7 * 11 * 17, 5, 19 * 23, -3, 0, 1);
    for (int t = 0; t < NVEC; t++) rns_vector(rand32(), rand32(), rand32(), rand32(), rand32(), rand32());

    for (int e = 0; e < EV_NUM; e++) begin
      $display("mechanism %-28s : %0d", ev_name[e], ev[e]);
      checks++;
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never occurred", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
