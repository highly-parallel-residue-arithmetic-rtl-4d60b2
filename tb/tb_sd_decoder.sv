// tb_sd_decoder: exhaustive check of the decoder over s' = -3..3.
// Expected split (q, q'): 0->(0,0), 1->(1,0), 2->(0,1), 3->(1,1), and the
// mirror image for negative s'; also checks s' = q + 2q'.
module tb_sd_decoder;
  import rns_pkg::*;

  int checks = 0;
  int failures = 0;
  ssum_t sp;
  tri_t  q, qp;

  sd_decoder dut (.sp(sp), .q(q), .qp(qp));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eq, eqp, mag, sgn;
    for (int v = -3; v <= 3; v++) begin
      sp = ssum_t'(v);
      #1;
      sgn = (v < 0) ? -1 : 1;
      mag = (v < 0) ? -v : v;
      eq  = sgn * (mag % 2);
      eqp = sgn * (mag / 2);
      checks++;
      if (int'(q) != eq || int'(qp) != eqp) begin
        failures++;
        $display("FAIL: s'=%0d got q=%0d q'=%0d expected q=%0d q'=%0d", v, q, qp, eq, eqp);
      end
      checks++;
      if (int'(q) + 2 * int'(qp) != v) begin
        failures++;
        $display("FAIL: s'=%0d breaks s' = q + 2q'", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
