// sd_decoder: level-restoring decoder for three-operand addition.
//
// After an SDFA and its incoming carry, a digit position holds s' in {-3..3},
// which is too wide to be an operand again. The decoder splits it into two
// ternary values q and q' (each in {-1,0,1}) with s' = q + 2*q'. The caller
// routes q' to the digit position k where 2*5^j = +-5^k (mod m), so that the
// weight of the value is unchanged, and adds q + q' there, which lands back in
// {-2..2}. The decoder also quantizes the current levels, because the SDFA
// does not restore them.
//
// The thresholds follow the decoder's detector set on |s'|:
//   q' magnitude is 1 when |s'| > 1.5                      (|s'| in {2,3})
//   q  magnitude is 1 when 0.5 <= |s'| <= 1.5 or |s'| > 2.5 (|s'| in {1,3})
// and both take the polarity of s'.
//
// Interface: sp = s' in, q and qp = q' out. Purely combinational.
module sd_decoder
  import rns_pkg::*;
(
  input  ssum_t sp,
  output tri_t  q,
  output tri_t  qp
);

  logic       neg;
  logic [2:0] mag;
  logic       q_on, qp_on;

  always_comb begin
    neg   = sp < 0;
    mag   = neg ? 3'(-sp) : 3'(sp);
    // window detector (0.5..1.5) plus threshold detector (2.5) for q
    q_on  = (mag == 3'd1) || (mag == 3'd3);
    // threshold detector (1.5) for q'
    qp_on = mag >= 3'd2;
    q     = q_on  ? (neg ? -2'sd1 : 2'sd1) : 2'sd0;
    qp    = qp_on ? (neg ? -2'sd1 : 2'sd1) : 2'sd0;
  end

endmodule
