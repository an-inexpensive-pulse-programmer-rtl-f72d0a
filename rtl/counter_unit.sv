// counter_unit: the tau-counter unit or the t_w-counter unit.
//
// It holds a data memory, a three-digit BCD counter and a comparator. In
// setup mode (ss high) the memory word at `raddr` goes to the display port
// and the comparator input is forced to zero; in run mode (ss low) the word
// goes to the comparator and its exponent code to master counter B, which
// returns `tick`, the time base 10^code clocks. While `run_en` is high the
// counter counts ticks, and `coinc` (C1 or C2) is a one-cycle pulse on the
// tick that brings the count to the stored mantissa x, i.e. x * 10^code
// clocks after the last `clr`. `clr` (C1 or PR) restarts the counter.
// The tau unit ties `run_en` high; the t_w unit takes it from the pulse
// generator output, so the t_w counter only runs during a pulse.
// Writes (`we`, `waddr`, `wdata`) come from the keyboard registers; `word`
// is the memory output as read, for the T- and N-counters.
// The unit's parts and the #1 enable follow the original; forcing the
// comparator input to zero in setup mode is this design's reading of its
// output demultiplexer.
module counter_unit
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ss,
  input  logic       we,
  input  addr_t      waddr,
  input  time_word_t wdata,
  input  addr_t      raddr,
  input  logic       clr,
  input  logic       run_en,
  input  logic       tick,
  output exp_code_t  exp_code,
  output time_word_t disp_word,
  output time_word_t word,
  output logic       coinc,
  output bcd3_t      count
);
  timeunit 1ns;
  timeprecision 1ps;

  time_word_t cmp_word;
  bcd3_t      count_next;
  logic       en;

  data_memory u_mem (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(raddr),
    .rdata(word)
  );

  // Output demultiplexer: display in setup mode, comparator in run mode.
  assign disp_word = ss ? word : '0;
  assign cmp_word  = ss ? '0   : word;
  assign exp_code  = cmp_word.exp;

  assign en = run_en && tick && !ss;

  bcd_counter #(.N(DIGITS)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (clr),
    .en        (en),
    .count     (count),
    .count_next(count_next)
  );

  assign coinc = en && (count_next == cmp_word.mant);

endmodule
