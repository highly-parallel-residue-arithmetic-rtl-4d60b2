// tb_cm_sdfa: sweeps the input current of the current-level SDFA from -6.5 to
// 6.5 units in steps of 0.05 (its transfer curve). Expected from the SDFA
// equations with steps at +-2.5: carry +1 above 2.5, -1 below -2.5, else 0,
// and inverted partial sum -(z - 5c). Also checks that the partial sum stays
// within -2.5..2.5 over the nominal range and counts the sawtooth's two jumps.
module tb_cm_sdfa;
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

  real z, w_n, c;

  cm_sdfa dut (.z(z), .w_n(w_n), .c(c));

  initial begin
    real ec, prev_w;
    int jumps;
    jumps = 0;
    prev_w = 0.0;
    for (int i = -130; i <= 130; i++) begin
      z = real'(i) * 0.05;
      #1;
      ec = (i > 50) ? 1.0 : (i < -50) ? -1.0 : 0.0;
      expect_eq("carry", c, ec);
      expect_eq("-w", w_n, -(z - 5.0 * ec));
      if (i >= -120 && i <= 120) begin
        checks++;
        if (w_n > 2.5 || w_n < -2.5) begin
          failures++;
          $display("FAIL: partial sum out of range at z=%f", z);
        end
      end
      if (i > -130 && (w_n - prev_w > 2.0 || prev_w - w_n > 2.0)) jumps++;
      prev_w = w_n;
    end
    checks++;
    if (jumps != 2) begin
      failures++;
      $display("FAIL: partial-sum curve has %0d jumps, expected 2", jumps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
