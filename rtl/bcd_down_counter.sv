// bcd_down_counter: synchronous BCD down counter of N decades with parallel
// load, the core of the T-counter and the N-counter (decade up/down
// counters with borrow chaining in the original).
//
// `load` copies `d` into the count and wins over `dec`. On a clock with
// `dec` high the count goes down by one, wrapping from 00..0 to 99..9.
// `at_one` is high while the count is 00..1: the next decrement reaches zero,
// which is when the owner raises its terminal pulse. Loading 0 therefore
// gives 10^N decrements before the terminal pulse. `clr` clears to zero.
module bcd_down_counter
  import pp_pkg::*;
#(
  parameter int unsigned N = DIGITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               load,
  input  bcd_digit_t [N-1:0] d,
  input  logic               dec,
  output bcd_digit_t [N-1:0] count,
  output logic               at_one
);
  timeunit 1ns;
  timeprecision 1ps;

  bcd_digit_t [N-1:0] count_dec;

  // Decremented value: a digit borrows when all lower digits are 0.
  always_comb begin
    logic borrow;
    borrow = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      if (borrow) begin
        count_dec[i] = (count[i] == 4'd0) ? 4'd9 : count[i] - 4'd1;
        borrow       = (count[i] == 4'd0);
      end else begin
        count_dec[i] = count[i];
      end
    end
  end

  always_comb begin
    at_one = (count[0] == 4'd1);
    for (int i = 1; i < int'(N); i++) at_one &= (count[i] == 4'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (clr)  count <= '0;
    else if (load) count <= d;
    else if (dec)  count <= count_dec;
  end

endmodule
