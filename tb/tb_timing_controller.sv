// tb_timing_controller: checks setup-mode writes, that start is ignored in
// setup mode, the order and one-clock length of the start steps (AL with
// QA, NL, AL without QA, TLA with CLR, TLO), the open gate, and the return
// to setup mode on PS and on SW6.
module tb_timing_controller;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, rst_n = 0, sw_setup = 0, sw_arm = 0, sw_start = 0, sw_write = 0, ps = 0;
  logic ss, dis, rw, qa, al, nl, tla, clr, tlo, gate, busy;
  int checks = 0, failures = 0;

  timing_controller dut (.*);

  always #5 clk = !clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(ref logic sw);
    @(negedge clk); sw = 1;
    repeat (4) @(negedge clk);
    sw = 0;
  endtask

  task automatic expect_step(input string name, input logic [7:0] got, input logic [7:0] want);
    checks++;
    if (got !== want) begin
      failures++; $display("%s: {qa,al,nl,tla,clr,tlo,gate,ss}=%b expected %b", name, got, want);
    end
  endtask

  function automatic logic [7:0] sig();
    return {qa, al, nl, tla, clr, tlo, gate, ss};
  endfunction

  task automatic start_and_check();
    int c = 0;
    @(negedge clk); sw_start = 1;
    // wait for the first step
    while (!al && c < 10) begin @(negedge clk); c++; end
    expect_step("AL9", sig(), 8'b1100_0000);
    @(negedge clk); expect_step("NL",  sig(), 8'b1010_0000);
    @(negedge clk); expect_step("AL8", sig(), 8'b0100_0000);
    @(negedge clk); expect_step("TLA", sig(), 8'b0001_1000);
    @(negedge clk); expect_step("TLO", sig(), 8'b0000_0100);
    @(negedge clk); expect_step("RUN", sig(), 8'b0000_0010);
    sw_start = 0;
    repeat (20) @(negedge clk);
    expect_step("RUN2", sig(), 8'b0000_0010);
  endtask

  initial begin
    int writes = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!ss || !dis || gate) failures++;
    // each write press gives exactly one strobe
    fork
      press(sw_write);
      repeat (8) begin @(negedge clk); #2 if (rw) writes++; end
    join
    checks++; if (writes != 1) begin failures++; $display("writes=%0d", writes); end
    // start ignored in setup mode
    press(sw_start);
    repeat (5) @(negedge clk);
    checks++; if (busy || gate) failures++;
    press(sw_arm);
    @(negedge clk);
    checks += 2;
    if (ss || dis) failures++;
    // no writes in run mode
    writes = 0;
    fork
      press(sw_write);
      repeat (8) begin @(negedge clk); #2 if (rw) writes++; end
    join
    if (writes != 0) failures++;
    start_and_check();
    // PS ends the run
    @(negedge clk); ps = 1;
    @(negedge clk); ps = 0;
    checks++; if (gate || !ss || busy) failures++;
    // again, ended by SW6
    press(sw_arm);
    start_and_check();
    press(sw_setup);
    @(negedge clk);
    checks++; if (gate || !ss) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
