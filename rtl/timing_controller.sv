// timing_controller: operating mode, start sequence and clock gate.
//
// A mode latch gives SS (setup mode, high after reset): while SS is high
// the memories take the keyboard address, the display is enabled (`dis`)
// and a rising edge of the write switch (`sw_write`, SW9) gives a one-cycle
// write strobe `rw`. A rising edge of `sw_arm` (SW7) clears SS (run mode);
// a rising edge of `sw_setup` (SW6) or the stop pulse `ps` sets it again.
// In run mode a rising edge of `sw_start` (SW8) plays the start sequence,
// one clock per step:
//   AL with QA high  - address counter loaded with 9 (word N)
//   NL               - N-counter loads N
//   AL with QA low   - address counter loaded with 8 (word T)
//   TLA and CLR      - T register latched; counters and address cleared
//   TLO              - T-counter loaded; the clock gate opens
// `gate` (the enable for CLK_A and CLK_B) then stays high until `ps` or
// SW6. The step order follows the original timing chart; the one-clock
// step length is this design's.
module timing_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic sw_setup,
  input  logic sw_arm,
  input  logic sw_start,
  input  logic sw_write,
  input  logic ps,
  output logic ss,
  output logic dis,
  output logic rw,
  output logic qa,
  output logic al,
  output logic nl,
  output logic tla,
  output logic clr,
  output logic tlo,
  output logic gate,
  output logic busy
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE, S_AL_N, S_NL, S_AL_T, S_TLA, S_TLO, S_RUN
  } state_t;

  state_t state;
  logic   setup_q, arm_q, start_q, write_q;
  logic   setup_evt, arm_evt, start_evt, write_evt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {setup_q, arm_q, start_q, write_q} <= '0;
    else        {setup_q, arm_q, start_q, write_q} <= {sw_setup, sw_arm, sw_start, sw_write};
  end

  assign setup_evt = sw_setup && !setup_q;
  assign arm_evt   = sw_arm   && !arm_q;
  assign start_evt = sw_start && !start_q;
  assign write_evt = sw_write && !write_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ss <= 1'b1;
    else if (setup_evt || ps)   ss <= 1'b1;
    else if (arm_evt)           ss <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                state <= S_IDLE;
    else if (setup_evt || ps)  state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (start_evt && !ss) state <= S_AL_N;
        S_AL_N:  state <= S_NL;
        S_NL:    state <= S_AL_T;
        S_AL_T:  state <= S_TLA;
        S_TLA:   state <= S_TLO;
        S_TLO:   state <= S_RUN;
        S_RUN:   state <= S_RUN;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign dis  = ss;
  assign rw   = ss && write_evt;
  assign qa   = (state == S_AL_N) || (state == S_NL);
  assign al   = (state == S_AL_N) || (state == S_AL_T);
  assign nl   = (state == S_NL);
  assign tla  = (state == S_TLA);
  assign clr  = (state == S_TLA);
  assign tlo  = (state == S_TLO);
  assign gate = (state == S_RUN);
  assign busy = (state != S_IDLE);

  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({al, nl, tla, tlo, gate}));
  a_gate_run: assert property (@(posedge clk) disable iff (!rst_n) gate |-> !ss);

endmodule
