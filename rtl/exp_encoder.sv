// exp_encoder: turns a stored exponent code back into sign and magnitude.
//
// Memory holds the exponent y as the code y + 6 (0..7). For display the
// code is converted back: codes 0..5 give a negative exponent of magnitude
// 6 - code, codes 6..7 a non-negative one of magnitude code - 6. The least
// significant bit passes straight through. Combinational.
// Its purpose follows the original; the code itself (exponent + 6) is this
// design's choice, so this is its exact inverse.
module exp_encoder
  import pp_pkg::*;
(
  input  exp_code_t  code,
  output logic       negative,
  output logic [2:0] mag
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    negative = (code < 3'(EXP_OFFSET));
    mag      = negative ? 3'(EXP_OFFSET) - code : code - 3'(EXP_OFFSET);
  end

endmodule
