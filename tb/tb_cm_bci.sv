// tb_cm_bci: the input stage passes a non-negative current to xp and a
// negative current to xn, the other branch carrying nothing; swept -6..6.
module tb_cm_bci;
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

  real x, xp, xn;

  cm_bci dut (.x(x), .xp(xp), .xn(xn));

  initial begin
    for (int i = -24; i <= 24; i++) begin
      x = real'(i) * 0.25;
      #1;
      expect_eq("xp", xp, (i >= 0) ? x : 0.0);
      expect_eq("xn", xn, (i < 0) ? x : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
