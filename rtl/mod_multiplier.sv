// mod_multiplier: mod m multiplier built as a barrel shifter with sign inverters.
//
// With the radix-5 coding, every nonzero multiplier coefficient of the
// symmetric residue set is +-5^k (mod m) for one k in 0..n-1, n = (m-1)/2.
// Multiplying by 5^k moves digit j to position j+k; a digit that passes the top
// position re-enters at the bottom multiplied by |5^n|_m, which is +1 or -1
// (a sign inverter on that diagonal of the shifter when it is -1). A negative
// coefficient inverts all product digits. No arithmetic on digit values takes
// place, so the delay is one switch plus one inverter at any digit count.
//
// Interface:
//   x    : multiplicand, n signed digits
//   sel  : one-hot shift control, sel[k] selects coefficient 5^k
//          (all zero gives the all-zero product, i.e. coefficient 0)
//   neg  : invert the product, for coefficients -5^k
//   p    : product, n signed digits
// Purely combinational. The one-hot shift control follows the shifter's
// control lines; the separate neg control is this design's choice for the
// sign inversion that yields the -5^k products. If several sel bits are set
// the highest wins (the pass-switch array would instead short the paths).
module mod_multiplier
  import rns_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  sd_t [num_digits(M)-1:0] x,
  input  logic [num_digits(M)-1:0] sel,
  input  logic                     neg,
  output sd_t [num_digits(M)-1:0] p
);

  localparam int N    = num_digits(M);
  localparam int WRAP = wrap_sign(M);

  if (!is_ppr(int'(M))) begin : g_bad_modulus
    $error("modulus %0d cannot use the radix-5 coding: 5 is not a pseudo-primitive root", M);
  end

  // Digits of x with the sign they carry after wrapping around once.
  sd_t [N-1:0] x_wrap;
  sd_t [N-1:0] shifted;

  for (genvar j = 0; j < N; j++) begin : g_wrap
    if (WRAP < 0) begin : g_inv
      sd_sign_inverter u_inv (.din(x[j]), .dout(x_wrap[j]));
    end else begin : g_pass
      assign x_wrap[j] = x[j];
    end
  end

  always_comb begin
    shifted = '0;
    for (int k = 0; k < N; k++) begin
      if (sel[k]) begin
        for (int j = 0; j < N; j++)
          shifted[j] = (j >= k) ? x[j-k] : x_wrap[j-k+N];
      end
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    sd_t inv;
    sd_sign_inverter u_inv (.din(shifted[j]), .dout(inv));
    assign p[j] = neg ? inv : shifted[j];
  end

endmodule
