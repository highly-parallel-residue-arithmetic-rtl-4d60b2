// mod_const_multiplier: multiplication of a coded residue digit by a constant.
//
// A constant coefficient COEF = s * 5^k (mod m) needs no switches at all: the
// product is the multiplicand with its digits re-wired k positions up, digits
// that wrap past the top taking the sign |5^n|_m, and every digit taking the
// sign s. Only sign inverters remain. COEF = 0 yields the zero product.
//
// Interface: x in, p = |COEF * x|_m out, both n = (M-1)/2 signed digits.
// Purely combinational. Parameters: M (modulus), COEF (any integer; reduced
// modulo M at elaboration). Output digits that need no inversion are plain
// wires from input digits; that is the intent of the block, not an omission.
module mod_const_multiplier
  import rns_pkg::*;
#(
  parameter int unsigned M    = 7,
  parameter int          COEF = 2
) (
  input  sd_t [num_digits(M)-1:0] x,
  output sd_t [num_digits(M)-1:0] p
);

  localparam int N    = num_digits(M);
  localparam int C    = sym_mod(COEF, M);
  localparam int K    = (C == 0) ? 0 : log5(C, M);
  // Sign applied to digit j of x: the coefficient's sign, times the wrap
  // sign for digits that move past the top position.
  localparam int S    = (C == 0) ? 1 : log5_sign(C, M);
  localparam int WRAP = wrap_sign(M);

  if (!is_ppr(int'(M))) begin : g_bad_modulus
    $error("modulus %0d cannot use the radix-5 coding: 5 is not a pseudo-primitive root", M);
  end

  for (genvar j = 0; j < N; j++) begin : g_dig
    localparam int SRC  = (j >= K) ? j - K : j - K + N;
    localparam int SGN  = (j >= K) ? S : S * WRAP;
    if (C == 0) begin : g_zero
      assign p[j] = '0;
    end else if (SGN < 0) begin : g_inv
      sd_sign_inverter u_inv (.din(x[SRC]), .dout(p[j]));
    end else begin : g_wire
      assign p[j] = x[SRC];
    end
  end

endmodule
