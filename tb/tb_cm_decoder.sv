// tb_cm_decoder: sweeps the input current of the current-level decoder from
// -3.5 to 3.5 units in steps of 0.05. Expected: q' = sgn * [|s'| > 1.5] and
// q = sgn * ([0.5 <= |s'| <= 1.5] + [|s'| > 2.5]); at the integer levels also
// s' = q + 2 q'.
module tb_cm_decoder;
  int checks = 0;
  int failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  task automatic expect_eq(string what, real got, real exp);
    checks++;
    if (!near(got, exp)) begin
      failures++;
      $display("FAIL: %s got %f expected %f", what, got, exp);
    end
  endtask

  real sp, q, qp;

  cm_decoder dut (.sp(sp), .q(q), .qp(qp));

  initial begin
    real sgn, mag, eq, eqp;
    for (int i = -70; i <= 70; i++) begin
      sp = real'(i) * 0.05;
      #1;
      sgn = (i < 0) ? -1.0 : 1.0;
      mag = (i < 0) ? -sp : sp;
      eqp = (mag > 1.5) ? sgn : 0.0;
      eq  = ((mag >= 0.5 && mag <= 1.5) || mag > 2.5) ? sgn : 0.0;
      expect_eq("q", q, eq);
      expect_eq("q'", qp, eqp);
      if (i % 20 == 0) expect_eq("s' = q + 2q'", q + 2.0 * qp, sp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
