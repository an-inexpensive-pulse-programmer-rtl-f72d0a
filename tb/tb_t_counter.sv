// tb_t_counter: latches a T word, loads it, and checks that the reset
// pulse PR recurs every x ticks (x the latched mantissa) for several
// periods, with ticks every clock and every fourth clock; also checks the
// exponent output and that a later TLA/TLO takes a new value.
module tb_t_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, tla = 0, tlo = 0, ct = 0, pr;
  time_word_t word = '0;
  exp_code_t exp_code;
  bcd3_t count;
  int checks = 0, failures = 0;

  t_counter dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int x, input int e, input int period);
    int ticks = 0, prs = 0, clocks = 0;
    @(negedge clk);
    word = '{exp: exp_code_t'(e), mant: to_bcd3(x % 1000)};
    tla = 1;
    @(negedge clk);
    tla = 0; word = '0; tlo = 1;
    @(negedge clk);
    tlo = 0;
    checks++;
    if (exp_code != exp_code_t'(e)) failures++;
    while (prs < 3 && clocks < 20000) begin
      ct = ((clocks % period) == period - 1);
      #1;
      if (ct) ticks++;
      if (pr) begin
        prs++;
        checks++;
        if (ticks != x) begin
          failures++; $display("T=%0d: PR after %0d ticks", x, ticks);
        end
        ticks = 0;
      end
      @(negedge clk);
      clocks++;
    end
    ct = 0;
    checks++;
    if (prs != 3) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(1, 3, 1);
    run_case(7, 0, 1);
    run_case(25, 5, 4);
    run_case(100, 7, 1);
    run_case(999, 2, 1);
    for (int i = 0; i < 5; i++) run_case(1 + $urandom % 400, $urandom % 8, 1 + $urandom % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
