// exp_warning: exponent warning for the display.
//
// The keyed exponent is a sign (`negative`) and a magnitude 0..7. Allowed
// exponents are -6..+1; `w` is high for any other value (+2..+7 and -7),
// warning the operator before the datum is written. Combinational.
// The inputs, the output and its purpose follow the original; the logic is
// written from the allowed range, not from its gate network.
module exp_warning (
  input  logic       negative,
  input  logic [2:0] mag,
  output logic       w
);
  timeunit 1ns;
  timeprecision 1ps;

  assign w = negative ? (mag == 3'd7) : (mag > 3'd1);

endmodule
