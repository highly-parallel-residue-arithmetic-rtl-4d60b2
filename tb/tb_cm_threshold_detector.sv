// tb_cm_threshold_detector: TD(2.5, 5) and TD(1.5, 1) swept from -1 to 4 units
// in steps of 0.05; output is m strictly above the threshold, else 0.
module tb_cm_threshold_detector;
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

  real x, y25, y15;

  cm_threshold_detector #(.T(2.5), .MOUT(5.0)) dut25 (.x(x), .y(y25));
  cm_threshold_detector #(.T(1.5), .MOUT(1.0)) dut15 (.x(x), .y(y15));

  initial begin
    for (int i = -20; i <= 80; i++) begin
      x = real'(i) * 0.05;
      #1;
      expect_eq("TD(2.5,5)", y25, (i > 50) ? 5.0 : 0.0);
      expect_eq("TD(1.5,1)", y15, (i > 30) ? 1.0 : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
