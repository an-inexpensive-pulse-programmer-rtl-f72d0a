// n_counter: the N-counter, which counts the repetitions of the sequence.
//
// NL loads the iteration number N (mantissa of memory word 9; its exponent
// is ignored) into a three-digit down counter. Every reset pulse `pr` of
// the T-counter counts it down by one; the `pr` that brings it to zero also
// gives the stop pulse `ps` (one cycle), which closes the clock gate. The
// sequence therefore runs N periods; N = 000 counts as 1000.
// Loading by NL, counting by PR and the stop pulse follow the original; the
// exact count (PS with the N-th PR) is this design's choice.
module n_counter
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  time_word_t word,
  input  logic       nl,
  input  logic       pr,
  output logic       ps,
  output bcd3_t      count
);
  timeunit 1ns;
  timeprecision 1ps;

  logic at_one;

  bcd_down_counter #(.N(DIGITS)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (1'b0),
    .load  (nl),
    .d     (word.mant),
    .dec   (pr),
    .count (count),
    .at_one(at_one)
  );

  assign ps = pr && at_one;

endmodule
