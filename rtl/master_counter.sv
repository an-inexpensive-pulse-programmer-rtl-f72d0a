// master_counter: the time-base divider (master counter A or B).
//
// DECADES cascaded decade stages count the gated clock while `en` is high.
// Tap k (0..DECADES) is a one-cycle tick every 10^k enabled clocks: tap 0 is
// `en` itself and tap k is high when the k lowest stages all read 9. Two
// tap multiplexers pick the time base for their users by a 3-bit exponent
// code: `tick_a` by `sel_a` (CT1 for the tau-counter in counter B, CT for
// the T-counter in counter A) and `tick_b` by `sel_b` (CT2 for the
// t_w-counter in counter B; unused in counter A). `clr` restarts the
// division so that the first tick of tap k comes 10^k enabled clocks later.
// In the original the tick is ORed with the clock to make a clock pulse for
// the next counter; here it is a clock enable in a single clock domain.
module master_counter
  import pp_pkg::*;
#(
  parameter int unsigned NDEC = DECADES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  exp_code_t            sel_a,
  input  exp_code_t            sel_b,
  output logic                 tick_a,
  output logic                 tick_b,
  output logic [NDEC:0]        taps
);
  timeunit 1ns;
  timeprecision 1ps;

  bcd_digit_t [NDEC-1:0] stage;

  // Tap k needs the enable and every stage below k at 9.
  logic [NDEC-1:0] at_nine;

  always_comb begin
    for (int k = 0; k < int'(NDEC); k++) at_nine[k] = (stage[k] == 4'd9);
  end

  assign taps[0] = en;
  for (genvar k = 1; k <= int'(NDEC); k++) begin : g_tap
    assign taps[k] = en && (&at_nine[k-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else if (clr) stage <= '0;
    else begin
      for (int k = 0; k < int'(NDEC); k++)
        if (taps[k]) stage[k] <= (stage[k] == 4'd9) ? 4'd0 : stage[k] + 4'd1;
    end
  end

  // A code above NDEC (possible only with a reduced NDEC) selects the top tap.
  always_comb begin
    tick_a = (int'(sel_a) > int'(NDEC)) ? taps[NDEC] : taps[sel_a];
    tick_b = (int'(sel_b) > int'(NDEC)) ? taps[NDEC] : taps[sel_b];
  end

endmodule
