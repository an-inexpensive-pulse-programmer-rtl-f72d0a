// input_data: keyboard data entry registers.
//
// A key gives one BCD digit in negative logic (`key_n`) with a one-cycle
// strobe `key_stb` (the key one-shot). The panel switch that is on decides
// where the digit goes: `sw_addr` (SW1) loads it into the 4-bit address
// register; `sw_mant` (SW2) shifts it into the three-digit mantissa,
// entering as the units digit while the older digits move up (so the
// hundreds digit is keyed first); `sw_exp` (SW3) loads its three low bits
// as the exponent magnitude. Each rising edge of `sw_sign` (SW4) toggles
// the exponent sign; `sw_clr` (SW5) clears mantissa, exponent and sign but
// not the address. The exponent y (-6..+1) is converted to the code
// y + 6 (0..7) that selects the time base. Registers change on the clock
// after the strobe. The register set and switch roles follow the original;
// the shift direction, sign toggling and code value are this design's.
module input_data
  import pp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] key_n,
  input  logic       key_stb,
  input  logic       sw_addr,
  input  logic       sw_mant,
  input  logic       sw_exp,
  input  logic       sw_sign,
  input  logic       sw_clr,
  output addr_t      addr,
  output bcd3_t      mant,
  output logic [2:0] exp_mag,
  output logic       exp_neg,
  output exp_code_t  exp_code,
  output time_word_t word
);
  timeunit 1ns;
  timeprecision 1ps;

  bcd_digit_t digit;
  logic       sw_sign_q;

  assign digit = ~key_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      mant      <= '0;
      exp_mag   <= '0;
      exp_neg   <= 1'b0;
      sw_sign_q <= 1'b0;
    end else begin
      sw_sign_q <= sw_sign;
      if (sw_clr) begin
        mant    <= '0;
        exp_mag <= '0;
        exp_neg <= 1'b0;
      end else begin
        if (key_stb && sw_mant) mant    <= {mant[DIGITS-2:0], digit};
        if (key_stb && sw_exp)  exp_mag <= digit[2:0];
        if (sw_sign && !sw_sign_q) exp_neg <= !exp_neg;
      end
      if (key_stb && sw_addr) addr <= digit;
    end
  end

  assign exp_code = exp_neg ? exp_code_t'(EXP_OFFSET) - exp_mag
                            : exp_code_t'(EXP_OFFSET) + exp_mag;
  assign word     = '{exp: exp_code, mant: mant};

endmodule
