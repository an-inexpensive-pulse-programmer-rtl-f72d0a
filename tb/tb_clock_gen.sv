// tb_clock_gen: drives a 1 MHz reference and counts output edges over
// 100 us: 100 with the 1 MHz choice, 200 with the 2 MHz choice; a change of
// the switch while ss is low must not take effect.
module tb_clock_gen;
  timeunit 1ns;
  timeprecision 1ps;

  logic ref_clk = 0, sel_fast = 0, ss = 1, clk_out;
  int checks = 0, failures = 0, edges = 0;

  clock_gen dut (.*);

  always #500 ref_clk = !ref_clk;
  always @(posedge clk_out) edges++;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_window(input int want);
    edges = 0;
    #100us;
    checks++;
    if (edges < want - 1 || edges > want + 1) begin
      failures++; $display("%0d edges in 100 us, expected %0d", edges, want);
    end
  endtask

  initial begin
    #10us;
    count_window(100);
    sel_fast = 1;
    #5us;
    count_window(200);
    ss = 0; sel_fast = 0;
    #5us;
    count_window(200);
    ss = 1;
    #5us;
    count_window(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
