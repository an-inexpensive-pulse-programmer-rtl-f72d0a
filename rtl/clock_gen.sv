// clock_gen: behavioural model of the standard clock pulse generator.
//
// This is a simulation model, not synthesizable logic: the original is a
// 1 MHz crystal oscillator plus a phase-locked loop (phase detector, VCO
// and divider) that makes a 2 MHz clock, followed by a select circuit. The
// model measures the period of `ref_clk` and produces a clock at MULT times
// its frequency, phase-aligned to each rising reference edge, standing in
// for the locked PLL. `sel_fast` (SW10) chooses the multiplied clock; the
// choice is taken over only while `ss` is high (setup mode), at a rising
// reference edge, so the clock cannot change during a run. `clk_out` is
// the system clock of the pulse programmer.
module clock_gen #(
  parameter int unsigned MULT = 2
) (
  input  logic ref_clk,
  input  logic sel_fast,
  input  logic ss,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime last_edge;
  realtime period;
  logic    pll_clk;
  logic    fast;

  initial begin
    last_edge = 0.0;
    period    = 0.0;
    pll_clk   = 1'b0;
    fast      = 1'b0;
  end

  always @(posedge ref_clk) begin
    if (last_edge > 0.0) period = $realtime - last_edge;
    last_edge = $realtime;
    if (ss) fast <= sel_fast;
    if (period > 0.0) begin
      for (int i = 0; i < int'(MULT); i++) begin
        pll_clk = 1'b1;
        #(period / real'(2 * MULT));
        pll_clk = 1'b0;
        if (i < int'(MULT) - 1) #(period / real'(2 * MULT));
      end
    end
  end

  assign clk_out = fast ? pll_clk : ref_clk;

endmodule
