// tb_address_counter: checks the keyboard address in setup mode, the AL
// loads of addresses 9 and 8, the clear to 0, stepping by 2 through the
// even and then the odd addresses, and Memory II's address one below.
module tb_address_counter;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0, ss = 1, al = 0, qa = 0, clr = 0, step = 0;
  addr_t key_addr = 0, addr_i, addr_ii, run_addr;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  address_counter dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_run(input int exp_addr);
    #1;
    checks += 2;
    if (addr_i != addr_t'(exp_addr)) begin
      failures++; $display("addr_i %0d expected %0d", addr_i, exp_addr);
    end
    if (addr_ii != addr_t'((exp_addr + 15) % 16)) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      key_addr = addr_t'(a);
      #1;
      checks += 2;
      if (addr_i != addr_t'(a) || addr_ii != addr_t'(a)) failures++;
    end
    @(negedge clk);
    ss = 0;
    al = 1; qa = 1;
    @(negedge clk);
    al = 0; check_run(9);
    al = 1; qa = 0;
    @(negedge clk);
    al = 0; check_run(8);
    clr = 1;
    @(negedge clk);
    clr = 0; check_run(0);
    // 0,2,..14 then 1,3,..15 then 0 again
    // Expected order after a clear: 0, 2, .. 14, 1, 3, .. 15, 0, ...
    model = 0;
    for (int i = 1; i <= 40; i++) begin
      step = 1;
      @(negedge clk);
      step = 0;
      model = (i % 16 < 8) ? 2 * (i % 16) : 2 * (i % 16 - 8) + 1;
      check_run(int'(model));
      @(negedge clk);
      check_run(int'(model));
    end
    // clear wins over step
    step = 1; clr = 1;
    @(negedge clk);
    step = 0; clr = 0; check_run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
