// bcd_counter: synchronous BCD up counter of DIGITS decades (a chain of
// 74LS160-style decade counters), as used in the tau- and t_w-counters.
//
// On each clock where `en` is high the count goes up by one, wrapping from
// 99..9 to 00..0. `clr` clears it synchronously and wins over `en`.
// `count_next` is the value the count would take on the next enabled clock;
// a comparator on it lets the owner detect "the count is about to reach the
// preset" in the same cycle, so a preset x ends an interval after exactly x
// enabled clocks. The original cascades ripple carries between counters;
// here the carry chain is combinational inside one clock domain.
module bcd_counter
  import pp_pkg::*;
#(
  parameter int unsigned N = DIGITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  en,
  output bcd_digit_t [N-1:0]    count,
  output bcd_digit_t [N-1:0]    count_next
);
  timeunit 1ns;
  timeprecision 1ps;

  // Incremented value: a digit rolls over when all lower digits are 9.
  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      if (carry) begin
        count_next[i] = (count[i] == 4'd9) ? 4'd0 : count[i] + 4'd1;
        carry         = (count[i] == 4'd9);
      end else begin
        count_next[i] = count[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count_next;
  end

endmodule
