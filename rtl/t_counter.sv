// t_counter: the T-counter, which sets the repetition period T.
//
// TLA latches the T word (mantissa and exponent code) read from memory
// word 8 into a register; TLO loads the mantissa into a three-digit down
// counter. The register's exponent code selects the time base of master
// counter A (`exp_code`), whose tick `ct` counts the counter down. On the
// tick that reaches zero the counter gives the reset pulse `pr` (one
// cycle) and reloads itself from the register in the same cycle, so `pr`
// recurs every x * 10^code clocks of the gated clock, starting from the
// clock gate opening. A latched mantissa of 000 counts as 1000.
// Register, reload on the period end and the exponent-controlled time base
// follow the original; detecting the end one tick ahead so that the period
// is exactly T is this design's.
module t_counter
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  time_word_t word,
  input  logic       tla,
  input  logic       tlo,
  input  logic       ct,
  output exp_code_t  exp_code,
  output logic       pr,
  output bcd3_t      count
);
  timeunit 1ns;
  timeprecision 1ps;

  time_word_t t_reg;
  logic       at_one;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   t_reg <= '0;
    else if (tla) t_reg <= word;
  end

  assign exp_code = t_reg.exp;
  assign pr       = ct && at_one;

  bcd_down_counter #(.N(DIGITS)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (1'b0),
    .load  (tlo || pr),
    .d     (t_reg.mant),
    .dec   (ct),
    .count (count),
    .at_one(at_one)
  );

endmodule
