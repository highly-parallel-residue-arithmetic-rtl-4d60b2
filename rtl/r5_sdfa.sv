// r5_sdfa: radix-5 signed-digit full adder (the non-wired part of it).
//
// The addends of one digit position are summed by wiring their currents
// together, giving the linear sum z in {-6..6}. This block splits z into a
// partial sum w in {-2..2} and a carry c in {-1,0,1} so that z = 5c + w:
//   z >  2 : c = +1, w = z - 5
//   z < -2 : c = -1, w = z + 5
//   else   : c =  0, w = z
// The circuit realises this with threshold detectors at 2.5 unit currents
// that switch in a 5-unit correction current and a 1-unit carry current; the
// comparisons below are the same thresholds. The carry then goes to the next
// digit position only, so the carry chain is never longer than one digit.
//
// Interface: z (linear sum), w (partial sum), c (carry). Purely combinational.
// The circuit delivers the partial sum with inverted polarity; this model
// presents it in true polarity, which only moves a sign inverter in the wiring.
module r5_sdfa
  import rns_pkg::*;
(
  input  lsum_t z,
  output sd_t   w,
  output tri_t  c
);

  always_comb begin
    if (z > 4'sd2) begin
      c = 2'sd1;
      w = sd_t'(z - 4'sd5);
    end else if (z < -4'sd2) begin
      c = -2'sd1;
      w = sd_t'(z + 4'sd5);
    end else begin
      c = 2'sd0;
      w = sd_t'(z);
    end
  end

endmodule
