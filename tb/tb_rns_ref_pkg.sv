// tb_rns_ref_pkg: reference arithmetic for the residue testbenches.
//
// Written from the number-system definitions alone (plain integer arithmetic),
// independent of the RTL package: symmetric residues, the value of a coded
// digit vector (sum of d_j * 5^j mod m), the shift/sign control for a
// coefficient, and a random coder that picks one of the many redundant
// digit vectors for a given residue.
package tb_rns_ref_pkg;

  localparam int MAXN = 48;

  function automatic int smod(longint v, int m);
    longint r;
    r = v % longint'(m);
    if (r < 0) r += longint'(m);
    if (r > longint'((m - 1) / 2)) r -= longint'(m);
    return int'(r);
  endfunction

  // 5^k mod m, symmetric.
  function automatic int p5(int k, int m);
    longint p;
    p = 1;
    for (int i = 0; i < k; i++) p = (p * 5) % longint'(m);
    return smod(p, m);
  endfunction

  // Value of a coded digit vector d[0..n-1] modulo m.
  function automatic int value_of(int d[MAXN], int n, int m);
    longint acc;
    longint w;
    acc = 0;
    w   = 1;
    for (int j = 0; j < n; j++) begin
      acc = acc + longint'(d[j]) * w;
      w   = (w * 5) % longint'(m);
    end
    return smod(acc, m);
  endfunction

  // Coefficient c = sign * 5^k (mod m). zero=1 for c = 0.
  function automatic void coef_ctrl(int c, int m, output int k, output bit neg,
                                    output bit zero);
    longint w;
    int cc;
    cc   = smod(c, m);
    k    = 0;
    neg  = 0;
    zero = (cc == 0);
    w    = 1;
    for (int j = 0; j < (m - 1) / 2; j++) begin
      if (smod(w, m) == cc) begin k = j; neg = 0; end
      if (smod(w, m) == -cc) begin k = j; neg = 1; end
      w = (w * 5) % longint'(m);
    end
  endfunction

  // Random digit vector, each digit uniform in {-2..2}.
  function automatic void rand_digits(int n, output int d[MAXN]);
    for (int j = 0; j < MAXN; j++) d[j] = (j < n) ? int'($urandom_range(4, 0)) - 2 : 0;
  endfunction

  // Random coding of residue r: draw digit vectors until one has value r.
  function automatic void encode(int r, int n, int m, output int d[MAXN]);
    int t[MAXN];
    do rand_digits(n, t); while (value_of(t, n, m) != smod(r, m));
    d = t;
  endfunction

endpackage
