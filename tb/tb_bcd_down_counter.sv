// tb_bcd_down_counter: random load/decrement stimulus against an integer
// model of a modulo-1000 down counter; checks count and the at-one flag.
module tb_bcd_down_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, load = 0, dec = 0, at_one;
  bcd3_t d, count;
  int unsigned model = 0, dval = 0;
  int checks = 0, failures = 0;

  bcd_down_counter #(.N(3)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != to_bcd3(model)) begin
        failures++; $display("count %0d expected %0d", bcd3_value(count), model);
      end
      checks++;
      if (at_one != (model == 1)) failures++;
      load = ($urandom % 50) == 0;
      dval = ($urandom % 2) ? $urandom % 1000 : $urandom % 12;
      d    = to_bcd3(dval);
      dec  = ($urandom % 4) != 0;
      clr  = ($urandom % 500) == 0;
      @(posedge clk);
      if (clr) model = 0;
      else if (load) model = dval;
      else if (dec) model = (model + 999) % 1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
