// tb_bcd_counter: random enable/clear stimulus against an integer model of
// a modulo-1000 counter; checks the BCD count and the look-ahead value.
module tb_bcd_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  bcd3_t count, count_next;
  int unsigned model = 0;
  int checks = 0, failures = 0;

  bcd_counter #(.N(3)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (bcd3_value(count) != model || count != to_bcd3(model)) begin
        failures++; $display("count %0d expected %0d", bcd3_value(count), model);
      end
      checks++;
      if (count_next != to_bcd3((model + 1) % 1000)) failures++;
      clr = ($urandom % 200) == 0;
      en  = ($urandom % 8) != 0;
      @(posedge clk);
      if (clr) model = 0; else if (en) model = (model + 1) % 1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
