// mod7_multiply_adder: mod 7 three-operand multiply adder with fixed
// coefficients, s = |2x + 3y - 2z|_7 by default.
//
// Modulo 7 a residue is three radix-5 signed digits, weights 5^0 = 1,
// 5^1 = -2, 5^2 = -3 (mod 7), and 5^3 = -1. The constant multiplications are
// pure wiring with sign inverters (2 = -5^1, 3 = -5^2, -2 = 5^1), so the whole
// unit is three SDFAs, three decoders and a handful of inverters.
//
// Interface: x, y, z and s, three signed digits each. Purely combinational.
// Parameters CA, CB, CC are the three coefficients; other constants re-wire
// the same structure.
module mod7_multiply_adder
  import rns_pkg::*;
#(
  parameter int CA = 2,
  parameter int CB = 3,
  parameter int CC = -2
) (
  input  sd_t [2:0] x,
  input  sd_t [2:0] y,
  input  sd_t [2:0] z,
  output sd_t [2:0] s
);

  sd_t [2:0] px, py, pz;

  mod_const_multiplier #(.M(7), .COEF(CA)) u_mul_x (.x(x), .p(px));
  mod_const_multiplier #(.M(7), .COEF(CB)) u_mul_y (.x(y), .p(py));
  mod_const_multiplier #(.M(7), .COEF(CC)) u_mul_z (.x(z), .p(pz));

  mod_three_operand_adder #(.M(7)) u_add (.a(px), .b(py), .c(pz), .s(s));

endmodule
