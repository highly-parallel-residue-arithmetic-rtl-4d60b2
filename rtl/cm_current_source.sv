// cm_current_source: behavioural model (not synthesizable logic) of the
// switched current source of the current-mode cell library.
//
// A voltage-mode control input switches a fixed current on or off:
// the output is 0 when the active-low control xn is 1, and MOUT when xn is 0.
// Currents are real numbers in units of the unit current (about 50 uA in the
// fabricated circuit); positive means current flowing out of the cell.
// The control polarity and the output magnitude follow the cell's definition;
// the real-number current scale is this model's choice. No timing: the output
// follows the input immediately.
module cm_current_source #(
  parameter real MOUT = 1.0
) (
  input  logic xn,
  output real  y
);

  always_comb y = xn ? 0.0 : MOUT;

endmodule
