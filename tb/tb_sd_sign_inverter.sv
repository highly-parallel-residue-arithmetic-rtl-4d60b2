// tb_sd_sign_inverter: exhaustive check of the digit sign inverter.
// Every digit value -2..2 is applied; the output must be its negation.
module tb_sd_sign_inverter;
  import rns_pkg::*;

  int checks = 0;
  int failures = 0;
  sd_t din, dout;

  sd_sign_inverter dut (.din(din), .dout(dout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -2; v <= 2; v++) begin
      din = sd_t'(v);
      #1;
      checks++;
      if (int'(dout) != -v) begin
        failures++;
        $display("FAIL: din=%0d dout=%0d", v, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
