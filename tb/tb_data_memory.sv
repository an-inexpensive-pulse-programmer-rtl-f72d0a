// tb_data_memory: writes every word with random data, then mixes random
// writes and reads against an array model.
module tb_data_memory;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, we = 0;
  addr_t waddr = 0, raddr = 0;
  time_word_t wdata = '0, rdata;
  time_word_t model [16];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = addr_t'(a); wdata = time_word_t'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0; waddr = addr_t'($urandom); wdata = time_word_t'($urandom);
      raddr = addr_t'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++; $display("addr %0d read %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
