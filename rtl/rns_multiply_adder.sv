// rns_multiply_adder: symmetric residue number system three-operand multiply
// adder, s = a*x + b*y + c*z, over a set of NUM_MODULI pairwise prime moduli.
//
// Every operand is a residue vector, one residue per modulus, and every residue
// is coded as (m_i-1)/2 radix-5 signed digits. Residues of different moduli
// never interact, so the unit is one mod m_i multiply adder per modulus, all
// working at once, and the delay is that of the slowest (largest) modulus,
// which is still one multiplier, one SDFA and one decoder.
//
// The default moduli {7,11,17,19,23,37,43,47,53,59,73,79,83} give a dynamic
// range of about 65.8 bits (enough for a 32 x 32-bit product) in 269 digits.
//
// Interface: all digit vectors are flattened; modulus i occupies digits
// digit_offset(i) .. digit_offset(i) + (m_i-1)/2 - 1, its lowest weight first.
//   x, y, z               : multiplicand digit vectors
//   sel_a, sel_b, sel_c   : one-hot coefficient shift controls, same layout
//   neg_a, neg_b, neg_c   : coefficient sign per modulus
//   s                     : result digit vector
// Conversion between binary and residue form is outside this unit.
// Purely combinational.
module rns_multiply_adder
  import rns_pkg::*;
#(
  parameter int unsigned MODULI [NUM_MODULI] = DEFAULT_MODULI
) (
  input  sd_t  [total_digits(MODULI)-1:0] x,
  input  sd_t  [total_digits(MODULI)-1:0] y,
  input  sd_t  [total_digits(MODULI)-1:0] z,
  input  logic [total_digits(MODULI)-1:0] sel_a,
  input  logic [total_digits(MODULI)-1:0] sel_b,
  input  logic [total_digits(MODULI)-1:0] sel_c,
  input  logic [NUM_MODULI-1:0]           neg_a,
  input  logic [NUM_MODULI-1:0]           neg_b,
  input  logic [NUM_MODULI-1:0]           neg_c,
  output sd_t  [total_digits(MODULI)-1:0] s
);

  for (genvar i = 0; i < NUM_MODULI; i++) begin : g_mod
    localparam int unsigned MI  = MODULI[i];
    localparam int          N   = num_digits(int'(MI));
    localparam int          OFF = digit_offset(i, MODULI);

    mod_multiply_adder #(.M(MI)) u_ma (
      .x    (x[OFF +: N]),
      .y    (y[OFF +: N]),
      .z    (z[OFF +: N]),
      .sel_a(sel_a[OFF +: N]),
      .sel_b(sel_b[OFF +: N]),
      .sel_c(sel_c[OFF +: N]),
      .neg_a(neg_a[i]),
      .neg_b(neg_b[i]),
      .neg_c(neg_c[i]),
      .s    (s[OFF +: N])
    );
  end

endmodule
