// pulse_generator: the output flip-flop.
//
// `pr` forces the flip-flop low; the coincidence pulse C1 (`c1`, end of a
// tau interval) sets it high and C2 (`c2`, end of a pulse width) clears it.
// PR wins over C1, and C1 over C2. `q` enables the t_w-counter; `pulse_out`
// is `q` or its complement as chosen by the polarity switch `negative`.
// Output changes one clock after the coincidence pulse.
// The set/clear roles of PR, C1 and C2 and the polarity switch follow the
// original; the priority between them is this design's.
module pulse_generator (
  input  logic clk,
  input  logic rst_n,
  input  logic pr,
  input  logic c1,
  input  logic c2,
  input  logic negative,
  output logic q,
  output logic pulse_out
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (pr) q <= 1'b0;
    else if (c1) q <= 1'b1;
    else if (c2) q <= 1'b0;
  end

  assign pulse_out = negative ? !q : q;

  // C2 comes from the t_w-counter, which only runs while the output is high.
  a_c2_in_pulse: assert property (@(posedge clk) disable iff (!rst_n) c2 |-> q);

endmodule
