// tb_counter_unit: writes words into the unit's memory in setup mode,
// checks the display path, then in run mode measures the number of ticks
// from a clear to the coincidence pulse (must equal the stored mantissa)
// with ticks every clock and every third clock, and checks that the unit
// stops while run_en is low.
module tb_counter_unit;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, ss = 1, we = 0, clr = 0, run_en = 1, tick = 0, coinc;
  addr_t waddr = 0, raddr = 0;
  time_word_t wdata = '0, disp_word, word;
  exp_code_t exp_code;
  bcd3_t count;
  int checks = 0, failures = 0;
  int unsigned xs [16];
  int unsigned es [16];

  counter_unit dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count ticks from clear to coincidence; tick every `period` clocks.
  task automatic measure(input int a, input int period, input bit gated);
    int ticks = 0, clocks = 0;
    bit seen = 0;
    @(negedge clk);
    raddr = addr_t'(a); clr = 1; tick = 0;
    @(negedge clk);
    clr = 0;
    while (!seen && clocks < 4000) begin
      tick = ((clocks % period) == period - 1);
      run_en = gated ? ((clocks / 7) % 2 == 0) : 1'b1;
      #1;
      if (tick && run_en) ticks++;
      if (coinc) seen = 1;
      checks++;
      if (exp_code != exp_code_t'(es[a])) failures++;
      @(negedge clk);
      clocks++;
    end
    tick = 0; run_en = 1;
    checks++;
    if (!seen || ticks != int'(xs[a])) begin
      failures++;
      $display("word %0d: coincidence after %0d ticks, expected %0d (seen=%0d)", a, ticks, xs[a], seen);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      xs[a] = 1 + $urandom % 300;
      es[a] = $urandom % 8;
      @(negedge clk);
      we = 1; waddr = addr_t'(a);
      wdata = '{exp: exp_code_t'(es[a]), mant: to_bcd3(xs[a])};
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 16; a++) begin
      raddr = addr_t'(a);
      #1;
      checks++;
      if (disp_word.mant != to_bcd3(xs[a]) || disp_word.exp != exp_code_t'(es[a])) failures++;
      if (exp_code != '0) failures++;
    end
    // In setup mode the counter never runs.
    tick = 1; raddr = 0;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (coinc || count != '0) failures++;
    end
    tick = 0;
    ss = 0;
    for (int a = 0; a < 16; a++) measure(a, 1, 0);
    for (int a = 0; a < 4; a++) measure(a, 3, 0);
    for (int a = 4; a < 8; a++) measure(a, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
