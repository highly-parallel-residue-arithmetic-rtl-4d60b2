// tb_r5_sdfa: exhaustive check of the radix-5 SDFA over z = -6..6.
// Expected carry: +1 above 2, -1 below -2, else 0; partial sum z - 5c.
// Also checks z = 5c + w and the partial sum range {-2..2}.
module tb_r5_sdfa;
  import rns_pkg::*;

  int checks = 0;
  int failures = 0;
  lsum_t z;
  sd_t   w;
  tri_t  c;

  r5_sdfa dut (.z(z), .w(w), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec;
    for (int v = -6; v <= 6; v++) begin
      z = lsum_t'(v);
      #1;
      ec = (v > 2) ? 1 : (v < -2) ? -1 : 0;
      checks++;
      if (int'(c) != ec || int'(w) != v - 5 * ec) begin
        failures++;
        $display("FAIL: z=%0d got c=%0d w=%0d expected c=%0d w=%0d", v, c, w, ec, v - 5 * ec);
      end
      checks++;
      if (int'(w) < -2 || int'(w) > 2 || 5 * int'(c) + int'(w) != v) begin
        failures++;
        $display("FAIL: z=%0d breaks z = 5c + w with w in range", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
