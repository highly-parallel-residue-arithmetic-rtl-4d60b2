// mod_three_operand_adder: carry-limited mod m addition of three coded digits.
//
// Each of the n = (M-1)/2 digit positions has one radix-5 SDFA and one decoder.
//   1. The three operand digits of position j are summed by wiring: z_j in {-6..6}.
//   2. The SDFA splits z_j = 5*c_j + w_j.
//   3. s'_j = w_j + c_(j-1), also a wired sum. The carry out of the top digit
//      enters position 0 times |5^n|_m = +-1 (end-around carry), so the mod m
//      reduction costs nothing and no carry travels more than one position.
//   4. The decoder splits s'_j = q_j + 2*q'_j. Since 2*5^j = +-5^k (mod m) for
//      some k, the value 2*q'_j*5^j equals +-q'_j*5^k: q'_j is routed, with that
//      sign, into position k.
//   5. s_k = q_k + (routed q'), again a wired sum, lies in {-2..2}: the result is
//      a valid operand for the next operation.
// Routing (which k, which sign) is derived from M at elaboration.
//
// Interface: a, b, c are the three operands, s the sum |a + b + c|_m, each as
// n signed digits. The result is one of the redundant codings of the residue,
// not a canonical one. Purely combinational: the delay is one SDFA plus one
// decoder at any modulus.
module mod_three_operand_adder
  import rns_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  sd_t [num_digits(M)-1:0] a,
  input  sd_t [num_digits(M)-1:0] b,
  input  sd_t [num_digits(M)-1:0] c,
  output sd_t [num_digits(M)-1:0] s
);

  localparam int N    = num_digits(M);
  localparam int WRAP = wrap_sign(M);

  if (!is_ppr(int'(M))) begin : g_bad_modulus
    $error("modulus %0d cannot use the radix-5 coding: 5 is not a pseudo-primitive root", M);
  end

  lsum_t [N-1:0] z;      // linear sum per position
  sd_t   [N-1:0] w;      // SDFA partial sums
  tri_t  [N-1:0] cy;     // SDFA carries
  tri_t  [N-1:0] cin;    // carry entering each position
  ssum_t [N-1:0] sp;     // s'
  tri_t  [N-1:0] q;      // decoder q
  tri_t  [N-1:0] qp;     // decoder q' (before routing)
  tri_t  [N-1:0] qr;     // q' arriving at each position after routing

  for (genvar j = 0; j < N; j++) begin : g_dig
    localparam int SRC  = qp_src(j, M);
    localparam int QSGN = qp_sign(SRC, M);

    assign z[j] = lsum_t'(a[j]) + lsum_t'(b[j]) + lsum_t'(c[j]);

    r5_sdfa u_sdfa (.z(z[j]), .w(w[j]), .c(cy[j]));

    if (j == 0) begin : g_cin_wrap
      assign cin[j] = (WRAP < 0) ? -cy[N-1] : cy[N-1];
    end else begin : g_cin
      assign cin[j] = cy[j-1];
    end

    assign sp[j] = ssum_t'(w[j]) + ssum_t'(cin[j]);

    sd_decoder u_dec (.sp(sp[j]), .q(q[j]), .qp(qp[j]));

    assign qr[j] = (QSGN < 0) ? -qp[SRC] : qp[SRC];
    assign s[j]  = sd_t'(q[j]) + sd_t'(qr[j]);
  end

endmodule
