// pp_pkg: types and constants shared by the pulse programmer.
//
// A time datum is x * 10^y seconds: x is three BCD digits
// (000..999) and y an exponent from -6 to 1, stored as the 3-bit code y+6
// (0..7). With a 1 MHz clock the code k selects a time base of 10^k clock
// periods, so the datum lasts x * 10^k clocks = x * 10^y s. The iteration
// number N uses the three digits only. Words 0..7 of the data memories hold
// tau1, tw1, tau2, tw2, ... tau4, tw4; word 8 holds T and word 9 holds N.
// The code y+6 is this design's reading of the exponent conversion; the
// digit count, exponent range and address map follow the original design.
package pp_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DIGITS     = 3;   // BCD digits of a time datum
  localparam int unsigned DECADES    = 7;   // decade stages of a master counter
  localparam int unsigned ADDR_W     = 4;   // 16-word data memories
  localparam int unsigned EXP_W      = 3;   // exponent code 0..7
  localparam int unsigned EXP_OFFSET = 6;   // code = exponent + 6
  localparam logic [ADDR_W-1:0] ADDR_T = 4'd8;
  localparam logic [ADDR_W-1:0] ADDR_N = 4'd9;

  typedef logic [3:0]          bcd_digit_t;
  typedef bcd_digit_t [DIGITS-1:0] bcd3_t;       // [2] hundreds .. [0] units
  typedef logic [EXP_W-1:0]    exp_code_t;
  typedef logic [ADDR_W-1:0]   addr_t;

  // One memory word: decoded exponent and three-digit mantissa.
  typedef struct packed {
    exp_code_t exp;
    bcd3_t     mant;
  } time_word_t;

  // Integer value of three BCD digits (used by testbenches and checks).
  function automatic int unsigned bcd3_value(bcd3_t v);
    return 100 * int'(v[2]) + 10 * int'(v[1]) + int'(v[0]);
  endfunction

  // Three BCD digits of an integer 0..999.
  function automatic bcd3_t to_bcd3(int unsigned n);
    bcd3_t r;
    r[0] = bcd_digit_t'(n % 10);
    r[1] = bcd_digit_t'((n / 10) % 10);
    r[2] = bcd_digit_t'((n / 100) % 10);
    return r;
  endfunction

endpackage
