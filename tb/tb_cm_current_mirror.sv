// tb_cm_current_mirror: output is -A times the input, for A = 1 and A = 2.5,
// over input currents from -6 to 6 units.
module tb_cm_current_mirror;
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

  real x, y1, y25;

  cm_current_mirror #(.A(1.0)) dut1 (.x(x), .y(y1));
  cm_current_mirror #(.A(2.5)) dut25 (.x(x), .y(y25));

  initial begin
    for (int i = -24; i <= 24; i++) begin
      x = real'(i) * 0.25;
      #1;
      expect_eq("A=1", y1, -x);
      expect_eq("A=2.5", y25, -2.5 * x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
