// tb_master_counter: runs the divider with a reduced number of stages and a
// random enable, counting enabled clocks independently; tap k must tick
// exactly when the enabled-clock count since the last clear is a multiple
// of 10^k, and the two multiplexers must follow their select codes.
module tb_master_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  localparam int unsigned ND = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, tick_a, tick_b;
  exp_code_t sel_a = 0, sel_b = 0;
  logic [ND:0] taps;
  longint unsigned n = 0;        // enabled clocks since clear
  int checks = 0, failures = 0;
  int ticks_top = 0;

  master_counter #(.NDEC(ND)) dut (.*);

  always #5 clk = !clk;

  function automatic bit expect_tap(int k, longint unsigned cnt, bit e);
    longint unsigned p = 1;
    for (int i = 0; i < k; i++) p *= 10;
    return e && (((cnt + 1) % p) == 0);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      en    = ($urandom % 5) != 0;
      clr   = ($urandom % 40000) == 0;
      sel_a = exp_code_t'($urandom % (ND + 1));
      sel_b = exp_code_t'($urandom % (ND + 1));
      #1;
      for (int k = 0; k <= int'(ND); k++) begin
        checks++;
        if (taps[k] != expect_tap(k, n, en)) begin
          failures++; $display("tap %0d at n=%0d wrong", k, n);
        end
      end
      checks += 2;
      if (tick_a != expect_tap(int'(sel_a), n, en)) failures++;
      if (tick_b != expect_tap(int'(sel_b), n, en)) failures++;
      if (taps[ND]) ticks_top++;
      @(posedge clk);
      if (clr) n = 0; else if (en) n++;
    end
    checks++;
    if (ticks_top == 0) begin failures++; $display("top tap never ticked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
