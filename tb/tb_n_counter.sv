// tb_n_counter: loads N and applies PR pulses; PS must come with exactly
// the N-th PR and not before.
module tb_n_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, nl = 0, pr = 0, ps;
  time_word_t word = '0;
  bcd3_t count;
  int checks = 0, failures = 0;

  n_counter dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int n);
    int prs = 0;
    @(negedge clk);
    word = '{exp: exp_code_t'($urandom), mant: to_bcd3(n)};
    nl = 1;
    @(negedge clk);
    nl = 0; word = '0;
    for (int i = 1; i <= n; i++) begin
      repeat ($urandom % 3) @(negedge clk);
      pr = 1;
      #1;
      checks++;
      if (ps != (i == n)) begin
        failures++; $display("N=%0d: PS=%0d at PR %0d", n, ps, i);
      end
      @(negedge clk);
      pr = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(1);
    run_case(2);
    run_case(10);
    run_case(999);
    run_case(1 + $urandom % 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
