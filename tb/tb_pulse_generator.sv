// tb_pulse_generator: random PR/C1/C2 pulses (C2 only while the output is
// high) against a set/reset model with PR > C1 > C2 priority; checks both
// output polarities.
module tb_pulse_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, pr = 0, c1 = 0, c2 = 0, negative = 0, q, pulse_out;
  bit model = 0;
  int checks = 0, failures = 0, sets = 0;

  pulse_generator dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q != model) failures++;
      if (pulse_out != (negative ? !model : model)) failures++;
      pr = ($urandom % 20) == 0;
      c1 = ($urandom % 6) == 0;
      c2 = model && (($urandom % 4) == 0);
      if (i % 1000 == 0) negative = !negative;
      @(posedge clk);
      if (pr) model = 0;
      else if (c1) begin model = 1; sets++; end
      else if (c2) model = 0;
    end
    checks++;
    if (sets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
