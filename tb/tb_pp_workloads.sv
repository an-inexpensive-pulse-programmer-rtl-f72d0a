// tb_pp_workloads: the pulse programmer at its default sizes, run at the
// edges of its specification.
//
// Run 1 uses the long time bases: delays and widths on codes 2..6 (10^2 to
// 10^6 clocks, 0.5 ms to 2 s at 1 MHz) and a period T = 1 x 10^1 s, the
// top tap of the seven-decade master counter (10^7 clocks), once.
// Run 2 uses the 2 MHz clock with the shortest settings: 0.5 us widths,
// 1 us delays, T = 10 us, repeated the maximum N = 999 times.
// Every pulse edge, every trigger and the stop are checked in nanoseconds.
module tb_pp_workloads;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic ref_1mhz = 0, rst_n = 0;
  logic [3:0] key_n = 4'hf;
  logic key_stb = 0;
  logic sw1_addr = 0, sw2_mant = 0, sw3_exp = 0, sw4_sign = 0, sw5_clr = 0;
  logic sw6_setup = 0, sw7_arm = 0, sw8_start = 0, sw9_write = 0, sw10_fast = 0, sw11_neg = 0;
  logic clk, pulse_out, q0, trigger, ss, dis, running, warning;
  addr_t key_addr;
  bcd3_t key_mant, disp_mant;
  logic key_exp_neg, disp_exp_neg;
  logic [2:0] key_exp_mag, disp_exp_mag;

  pulse_programmer dut (.*);

  always #500 ref_1mhz = !ref_1mhz;     // 1 MHz crystal

  int checks = 0, failures = 0;
  // mechanism counters
  int n_writes = 0, n_warn = 0, n_rise = 0, n_fall = 0, n_trig = 0, n_stop = 0;
  int n_fast = 0, n_neg = 0, n_readback = 0;

  initial begin
    #15s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- panel operations ----------------
  task automatic key(input int d);
    @(negedge clk); key_n = ~4'(d); key_stb = 1;
    @(negedge clk); key_stb = 0; key_n = 4'hf;
  endtask

  task automatic press(ref logic sw);
    @(negedge clk); sw = 1;
    repeat (3) @(negedge clk);
    sw = 0;
    @(negedge clk);
  endtask

  // Key x * 10^y into word a and write it.
  task automatic write_word(input int a, input int x, input int y);
    @(negedge clk); sw1_addr = 1; key(a); sw1_addr = 0;
    press(sw5_clr);
    sw2_mant = 1; key(x / 100); key((x / 10) % 10); key(x % 10); sw2_mant = 0;
    sw3_exp = 1; key(y < 0 ? -y : y); sw3_exp = 0;
    if (y < 0) press(sw4_sign);
    @(negedge clk);
    checks++;
    if (warning) begin failures++; $display("warning for exponent %0d", y); end
    press(sw9_write);
    n_writes++;
  endtask

  // Read word a back through the display outputs.
  task automatic read_word(input int a, input int x, input int y);
    @(negedge clk); sw1_addr = 1; key(a); sw1_addr = 0;
    @(negedge clk);
    checks++;
    if (!dis || bcd3_value(disp_mant) != x || disp_exp_neg != (y < 0) ||
        int'(disp_exp_mag) != (y < 0 ? -y : y)) begin
      failures++;
      $display("word %0d reads %0d e %s%0d, expected %0d e %0d", a, bcd3_value(disp_mant),
               disp_exp_neg ? "-" : "+", disp_exp_mag, x, y);
    end else n_readback++;
  endtask

  // ---------------- the programmed sequence ----------------
  int tau_x [4] = '{2, 3, 1, 2};
  int tau_y [4] = '{-3, -2, -1, 0};
  int tw_x  [4] = '{5, 1, 5, 1};
  int tw_y  [4] = '{-4, -2, -2, -1};
  int t_x = 1, t_y = 1;

  function automatic longint unsigned clocks_of(input int x, input int y);
    longint unsigned c = longint'(x);
    for (int i = -6; i < y; i++) c *= 10;
    return c;
  endfunction

  // ---------------- edge monitor ----------------
  realtime t_open;
  realtime rises[$], falls[$], trigs[$];
  logic q_prev = 0, run_prev = 0;
  bit   monitoring = 0;

  always @(negedge clk) begin
    if (monitoring) begin
      if (running && !run_prev) t_open = $realtime;
      if (q0 && !q_prev) begin rises.push_back($realtime); n_rise++; end
      if (!q0 && q_prev) begin falls.push_back($realtime); n_fall++; end
      if (trigger) begin trigs.push_back($realtime); n_trig++; end
      if (running) begin
        checks++;
        if (pulse_out != (sw11_neg ? !q0 : q0)) failures++;
        if (sw11_neg) n_neg++;
      end
    end
    q_prev   <= q0;
    run_prev <= running;
  end

  // Clock period measured on the system clock.
  realtime last_clk, clk_period;
  always @(posedge clk) begin
    clk_period = $realtime - last_clk;
    last_clk   = $realtime;
  end

  task automatic run_and_check(input int n_periods, input bit fast, input bit neg);
    realtime tclk, base, t_period, cum, exp_r, exp_f;
    int waited = 0;
    rises.delete(); falls.delete(); trigs.delete();
    sw11_neg = neg;
    if (fast != sw10_fast) begin sw10_fast = fast; repeat (4) @(negedge clk); end
    tclk = fast ? 500.0 : 1000.0;
    checks++;
    if (clk_period != tclk) begin failures++; $display("clock period %0t", clk_period); end
    else if (fast) n_fast++;
    monitoring = 1;
    press(sw7_arm);
    checks++; if (ss) failures++;
    press(sw8_start);
    while (!ss && waited < 20000000) begin @(negedge clk); waited++; end
    monitoring = 0;
    checks++;
    if (!ss || running) begin failures++; $display("run did not stop"); end
    else n_stop++;
    t_period = real'(clocks_of(t_x, t_y)) * tclk;
    // edges are seen one sample after the register changes: same offset
    // for the gate and the pulses, so offsets cancel except for PR, which is
    // combinational in the last clock of the period.
    checks += 3;
    if (rises.size() != 4 * n_periods) begin failures++; $display("%0d rises", rises.size()); end
    if (falls.size() != 4 * n_periods) begin failures++; $display("%0d falls", falls.size()); end
    if (trigs.size() != n_periods) begin failures++; $display("%0d triggers", trigs.size()); end
    for (int p = 0; p < n_periods; p++) begin
      base = t_open + p * t_period;
      cum  = 0;
      for (int i = 0; i < 4; i++) begin
        cum  += real'(clocks_of(tau_x[i], tau_y[i])) * tclk;
        exp_r = base + cum;
        exp_f = exp_r + real'(clocks_of(tw_x[i], tw_y[i])) * tclk;
        checks += 2;
        if (4 * p + i < rises.size() && rises[4 * p + i] != exp_r) begin
          failures++; $display("period %0d pulse %0d rises at %0t, expected %0t", p, i, rises[4*p+i], exp_r);
        end
        if (4 * p + i < falls.size() && falls[4 * p + i] != exp_f) begin
          failures++; $display("period %0d pulse %0d falls at %0t, expected %0t", p, i, falls[4*p+i], exp_f);
        end
      end
      checks++;
      if (p < trigs.size() && trigs[p] != base + t_period - tclk) begin
        failures++; $display("trigger %0d at %0t, expected %0t", p, trigs[p], base + t_period - tclk);
      end
    end
  endtask

  task automatic program_all(input int n);
    for (int i = 0; i < 4; i++) begin
      write_word(2 * i, tau_x[i], tau_y[i]);
      write_word(2 * i + 1, tw_x[i], tw_y[i]);
    end
    write_word(8, t_x, t_y);
    write_word(9, n, 0);
    for (int i = 0; i < 4; i++) begin
      read_word(2 * i, tau_x[i], tau_y[i]);
      read_word(2 * i + 1, tw_x[i], tw_y[i]);
    end
    read_word(8, t_x, t_y);
    read_word(9, n, 0);
  endtask

  initial begin
    repeat (5) @(posedge ref_1mhz);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // warning for exponent -7
    press(sw5_clr);
    sw3_exp = 1; key(7); sw3_exp = 0;
    press(sw4_sign);
    @(negedge clk);
    checks++;
    if (!warning) failures++; else n_warn++;
    program_all(1);
    run_and_check(1, 0, 0);
    tau_x = '{2, 3, 2, 2};
    tau_y = '{-6, -6, -6, -6};
    tw_x  = '{1, 1, 1, 1};
    tw_y  = '{-6, -6, -6, -6};
    t_x = 2; t_y = -5;
    program_all(999);
    run_and_check(999, 1, 1);

    $display("mechanisms: writes=%0d readbacks=%0d warnings=%0d pulse_starts=%0d pulse_ends=%0d triggers=%0d stops=%0d fast_clock_runs=%0d",
             n_writes, n_readback, n_warn, n_rise, n_fall, n_trig, n_stop, n_fast);
    checks += 8;
    if (n_writes == 0) failures++;
    if (n_readback == 0) failures++;
    if (n_warn == 0) failures++;
    if (n_rise != 4 * 1000) failures++;
    if (n_fall != 4 * 1000) failures++;
    if (n_trig != 1000) failures++;
    if (n_stop != 2) failures++;
    if (n_fast == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
