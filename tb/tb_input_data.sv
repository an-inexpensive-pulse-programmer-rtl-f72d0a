// tb_input_data: keys addresses, three-digit mantissas and exponents with
// both signs through the panel switches, and checks the registers, the
// exponent code (exponent + 6), the clear switch and that SW5 keeps the
// address.
module tb_input_data;
  timeunit 1ns;
  timeprecision 1ps;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] key_n = 4'hf;
  logic key_stb = 0, sw_addr = 0, sw_mant = 0, sw_exp = 0, sw_sign = 0, sw_clr = 0;
  addr_t addr;
  bcd3_t mant;
  logic [2:0] exp_mag;
  logic exp_neg;
  exp_code_t exp_code;
  time_word_t word;
  int checks = 0, failures = 0;

  input_data dut (.*);

  always #5 clk = !clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic key(input int d);
    @(negedge clk);
    key_n = ~4'(d); key_stb = 1;
    @(negedge clk);
    key_stb = 0; key_n = 4'hf;
  endtask

  task automatic press_sign();
    @(negedge clk); sw_sign = 1;
    repeat (3) @(negedge clk);
    sw_sign = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int a, x, m, y;
      bit neg;
      a = $urandom % 16;
      x = $urandom % 1000;
      neg = $urandom % 2;
      m = neg ? $urandom % 7 : $urandom % 2;
      y = neg ? -m : m;
      sw_addr = 1; key(a); sw_addr = 0;
      sw_mant = 1; key(x / 100); key((x / 10) % 10); key(x % 10); sw_mant = 0;
      sw_exp = 1; key(m); sw_exp = 0;
      if (neg != exp_neg) press_sign();
      #1;
      checks += 5;
      if (addr != addr_t'(a)) failures++;
      if (bcd3_value(mant) != x) begin failures++; $display("mant %0d expected %0d", bcd3_value(mant), x); end
      if (int'(exp_mag) != m || exp_neg != neg) failures++;
      if (int'(exp_code) != y + 6) begin failures++; $display("exp %0d code %0d", y, exp_code); end
      if (word.mant != mant || word.exp != exp_code) failures++;
      if (i % 10 == 9) begin
        @(negedge clk); sw_clr = 1;
        @(negedge clk); sw_clr = 0;
        #1;
        checks += 2;
        if (mant != '0 || exp_mag != '0 || exp_neg) failures++;
        if (addr != addr_t'(a)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
