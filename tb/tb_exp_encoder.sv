// tb_exp_encoder: every code 0..7 must give back the exponent code - 6 as
// sign and magnitude.
module tb_exp_encoder;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  exp_code_t code;
  logic negative;
  logic [2:0] mag;
  int checks = 0, failures = 0;

  exp_encoder dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      int y;
      code = exp_code_t'(c);
      y = c - 6;
      #1;
      checks++;
      if (negative != (y < 0) || int'(mag) != (y < 0 ? -y : y)) begin
        failures++; $display("code %0d: neg=%0d mag=%0d", c, negative, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
