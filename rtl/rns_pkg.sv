// rns_pkg: shared types and elaboration-time arithmetic for the multiple-valued
// coded symmetric residue number system.
//
// A residue digit x_i modulo an odd modulus m is held as n = (m-1)/2 radix-5
// signed digits x_ij in {-2..2}, with x_i = sum_j x_ij * 5^j (mod m). This works
// for every modulus in which 5 is a pseudo-primitive root: the magnitudes of
// |5^0|_m .. |5^(n-1)|_m cover 1..(m-1)/2 and |5^n|_m = +1 or -1. Multiplying by
// +-5^k is then a rotation of the digit vector, and every nonzero residue is some
// +-5^k, so every multiplication is a rotation plus sign inversions.
//
// In the circuit each digit is a bidirectional current whose level and polarity
// give the value; here each digit is a small two's-complement number. The
// functions below are constant functions: modules call them to derive their
// wiring (rotation signs, carry wrap sign, decoder routing) from the modulus.
package rns_pkg;

  // Radix-5 signed digit, {-2..2}.
  typedef logic signed [2:0] sd_t;
  // Linear (wired) sum of three digits, {-6..6}.
  typedef logic signed [3:0] lsum_t;
  // Intermediate sum s' = w + carry-in, {-3..3}.
  typedef logic signed [2:0] ssum_t;
  // Ternary value {-1,0,1}: SDFA carry and decoder outputs q, q'.
  typedef logic signed [1:0] tri_t;

  // Moduli set of the full-width RNS multiply adder (about 65.8 bits of range).
  localparam int NUM_MODULI = 13;
  localparam int unsigned DEFAULT_MODULI [NUM_MODULI] =
    '{7, 11, 17, 19, 23, 37, 43, 47, 53, 59, 73, 79, 83};

  // Symmetric residue: the remainder of least magnitude, in -(m-1)/2..(m-1)/2.
  function automatic int sym_mod(int v, int m);
    int r;
    r = v % m;
    if (r < 0) r += m;
    if (r > (m - 1) / 2) r -= m;
    return r;
  endfunction

  // Number of radix-5 digits of a coded residue digit modulo m.
  function automatic int num_digits(int m);
    return (m - 1) / 2;
  endfunction

  // |5^k|_m in symmetric form.
  function automatic int pow5(int k, int m);
    int p;
    p = 1;
    for (int i = 0; i < k; i++) p = (p * 5) % m;
    return sym_mod(p, m);
  endfunction

  // Sign of |5^n|_m: +1 or -1. A carry or a shifted digit leaving the top
  // position re-enters position 0 multiplied by this sign.
  function automatic int wrap_sign(int m);
    return pow5(num_digits(m), m);
  endfunction

  // 1 when 5 is a pseudo-primitive root modulo odd m: the magnitudes of
  // |5^0|_m .. |5^(n-1)|_m are all different (so they cover 1..n) and
  // |5^n|_m = +-1. Only such moduli can use the radix-5 coding.
  function automatic bit is_ppr(int m);
    int n;
    bit [127:0] seen;
    n = num_digits(m);
    if (m < 3 || m % 2 == 0 || n > 127) return 1'b0;
    seen = '0;
    for (int k = 0; k < n; k++) begin
      int a;
      a = pow5(k, m);
      if (a < 0) a = -a;
      if (a == 0 || seen[a]) return 1'b0;
      seen[a] = 1'b1;
    end
    return (pow5(n, m) == 1) || (pow5(n, m) == -1);
  endfunction

  // Exponent k with |5^k|_m = +-v (v nonzero), i.e. the discrete log of |v|.
  function automatic int log5(int v, int m);
    int n;
    int t;
    n = num_digits(m);
    t = sym_mod(v, m);
    for (int k = 0; k < n; k++)
      if (pow5(k, m) == t || pow5(k, m) == -t) return k;
    return 0;
  endfunction

  // Sign s with v = s * |5^log5(v)|_m.
  function automatic int log5_sign(int v, int m);
    return (pow5(log5(v, m), m) == sym_mod(v, m)) ? 1 : -1;
  endfunction

  // Decoder routing of eq. (17): |2*5^j|_m = qp_sign * |5^k|_m with k = qp_dest.
  // The doubled part q' of digit j is added into digit k with sign qp_sign.
  function automatic int qp_dest(int j, int m);
    return log5(2 * pow5(j, m), m);
  endfunction

  function automatic int qp_sign(int j, int m);
    return log5_sign(2 * pow5(j, m), m);
  endfunction

  // Inverse routing: the digit j whose q' is routed into digit k.
  function automatic int qp_src(int k, int m);
    for (int j = 0; j < num_digits(m); j++)
      if (qp_dest(j, m) == k) return j;
    return 0;
  endfunction

  // Position of the first digit of modulus number idx in a flattened RNS vector.
  function automatic int digit_offset(int idx, int unsigned moduli [NUM_MODULI]);
    int off;
    off = 0;
    for (int i = 0; i < idx; i++) off += num_digits(int'(moduli[i]));
    return off;
  endfunction

  function automatic int total_digits(int unsigned moduli [NUM_MODULI]);
    return digit_offset(NUM_MODULI, moduli);
  endfunction

endpackage
