// tb_exp_warning: all sixteen sign/magnitude combinations against the
// allowed exponent range -6..+1.
module tb_exp_warning;
  timeunit 1ns;
  timeprecision 1ps;

  logic negative, w;
  logic [2:0] mag;
  int checks = 0, failures = 0;

  exp_warning dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 8; m++) begin
        int y;
        negative = s[0]; mag = 3'(m);
        y = s ? -m : m;
        #1;
        checks++;
        if (w != (y < -6 || y > 1)) begin
          failures++; $display("exponent %0d: w=%0d", y, w);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
