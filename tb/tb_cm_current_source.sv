// tb_cm_current_source: the switched current source gives MOUT when its
// active-low control is 0 and no current when it is 1 (two sizes checked).
module tb_cm_current_source;
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

  logic xn;
  real  y1, y5;

  cm_current_source #(.MOUT(1.0)) dut1 (.xn(xn), .y(y1));
  cm_current_source #(.MOUT(5.0)) dut5 (.xn(xn), .y(y5));

  initial begin
    xn = 1'b1; #1;
    expect_eq("off, m=1", y1, 0.0);
    expect_eq("off, m=5", y5, 0.0);
    xn = 1'b0; #1;
    expect_eq("on, m=1", y1, 1.0);
    expect_eq("on, m=5", y5, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
