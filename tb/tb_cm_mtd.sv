// tb_cm_mtd: MTD(0.5, 1.5 : 1) swept from -1 to 4 units in steps of 0.05;
// output is 1 inside the closed window [0.5, 1.5], else 0.
module tb_cm_mtd;
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

  real x, y;

  cm_mtd #(.T1(0.5), .T2(1.5), .MOUT(1.0)) dut (.x(x), .y(y));

  initial begin
    for (int i = -20; i <= 80; i++) begin
      x = real'(i) * 0.05;
      #1;
      expect_eq("MTD(0.5,1.5:1)", y, (i >= 10 && i <= 30) ? 1.0 : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
