// mod_multiply_adder: mod m three-operand multiply adder, s = |a*x + b*y + c*z|_m.
//
// Three barrel-shifter multipliers (one per operand pair) feed a three-operand
// adder (one SDFA and one decoder per digit position). Nothing propagates
// across more than one digit position, so the multiply-add delay is one
// multiplier, one SDFA and one decoder whatever the modulus.
//
// Interface (n = (M-1)/2):
//   x, y, z               : multiplicands, n signed digits each
//   sel_a, sel_b, sel_c   : one-hot coefficient controls, bit k selects 5^k
//   neg_a, neg_b, neg_c   : coefficient sign (1 selects -5^k)
//   s                     : result, n signed digits
// Purely combinational.
module mod_multiply_adder
  import rns_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  sd_t  [num_digits(M)-1:0] x,
  input  sd_t  [num_digits(M)-1:0] y,
  input  sd_t  [num_digits(M)-1:0] z,
  input  logic [num_digits(M)-1:0] sel_a,
  input  logic [num_digits(M)-1:0] sel_b,
  input  logic [num_digits(M)-1:0] sel_c,
  input  logic                     neg_a,
  input  logic                     neg_b,
  input  logic                     neg_c,
  output sd_t  [num_digits(M)-1:0] s
);

  localparam int N = num_digits(M);

  sd_t [N-1:0] px, py, pz;

  mod_multiplier #(.M(M)) u_mul_x (.x(x), .sel(sel_a), .neg(neg_a), .p(px));
  mod_multiplier #(.M(M)) u_mul_y (.x(y), .sel(sel_b), .neg(neg_b), .p(py));
  mod_multiplier #(.M(M)) u_mul_z (.x(z), .sel(sel_c), .neg(neg_c), .p(pz));

  mod_three_operand_adder #(.M(M)) u_add (.a(px), .b(py), .c(pz), .s(s));

endmodule
