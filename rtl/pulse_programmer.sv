// pulse_programmer: four-channel pulse programmer for transient NQR.
//
// Generates a train of up to four output pulses, each with its own delay
// tau_i (measured from the start of the previous pulse, or from the start
// of the period for the first) and width t_w_i, repeated every period T
// for N periods, with a trigger pulse at each period end. Every time is a
// three-digit mantissa times a power of ten (10^-6 .. 10^1 s with the
// 1 MHz clock, half that with the 2 MHz clock).
//
// Operation: in setup mode the operator keys an address, mantissa and
// exponent (input_data) and writes the datum into Memory I and Memory II at
// once (SW9). Words 0..7 hold tau1, tw1, .. tau4, tw4; word 8 holds T and
// word 9 N. SW7 selects run mode and SW8 starts: the timing controller
// loads N and T, clears everything and opens the clock gate. Master counter
// B provides the time bases of the tau-counter (Memory I, address a) and
// the t_w-counter (Memory II, address a-1). The tau coincidence C1 starts a
// pulse, restarts master counter B and both counters, and steps a by 2; the
// t_w coincidence C2 ends the pulse. Master counter A times the T-counter,
// whose reset pulse PR clears all counters and the address, clocks the
// N-counter and triggers the scope; when N periods are done PS closes the
// gate and returns to setup mode.
//
// Everything runs on the one clock from clock_gen (a behavioural model of
// the crystal/PLL clock); the gated clocks of the original are clock
// enables here. All outputs are registered or derived from registers within
// one clock. Unbuilt parts (LED display, power output stage) connect
// through the ports: the display words and the warning, and `pulse_out`.
module pulse_programmer
  import pp_pkg::*;
(
  input  logic       ref_1mhz,     // crystal oscillator output
  input  logic       rst_n,        // power-on reset
  input  logic [3:0] key_n,        // keyboard digit, negative logic
  input  logic       key_stb,      // one-cycle key strobe
  input  logic       sw1_addr,     // key goes to address register
  input  logic       sw2_mant,     // key goes to mantissa shift register
  input  logic       sw3_exp,      // key goes to exponent register
  input  logic       sw4_sign,     // toggle exponent sign
  input  logic       sw5_clr,      // clear data registers
  input  logic       sw6_setup,    // back to setup mode
  input  logic       sw7_arm,      // to run mode
  input  logic       sw8_start,    // start the pulse sequence
  input  logic       sw9_write,    // write the keyed datum
  input  logic       sw10_fast,    // 2 MHz clock instead of 1 MHz
  input  logic       sw11_neg,     // negative output pulses
  output logic       clk,          // system clock (to the display)
  output logic       pulse_out,
  output logic       q0,
  output logic       trigger,
  output logic       ss,
  output logic       dis,
  output logic       running,
  output logic       warning,
  output addr_t      key_addr,
  output bcd3_t      key_mant,
  output logic       key_exp_neg,
  output logic [2:0] key_exp_mag,
  output bcd3_t      disp_mant,
  output logic       disp_exp_neg,
  output logic [2:0] disp_exp_mag
);
  timeunit 1ns;
  timeprecision 1ps;

  // ---- clock ----
  clock_gen u_clock (
    .ref_clk (ref_1mhz),
    .sel_fast(sw10_fast),
    .ss      (ss),
    .clk_out (clk)
  );

  // ---- data entry ----
  exp_code_t  key_exp_code;
  time_word_t key_word;

  input_data u_input (
    .clk     (clk),
    .rst_n   (rst_n),
    .key_n   (key_n),
    .key_stb (key_stb),
    .sw_addr (sw1_addr),
    .sw_mant (sw2_mant),
    .sw_exp  (sw3_exp),
    .sw_sign (sw4_sign),
    .sw_clr  (sw5_clr),
    .addr    (key_addr),
    .mant    (key_mant),
    .exp_mag (key_exp_mag),
    .exp_neg (key_exp_neg),
    .exp_code(key_exp_code),
    .word    (key_word)
  );

  exp_warning u_warn (
    .negative(key_exp_neg),
    .mag     (key_exp_mag),
    .w       (warning)
  );

  // ---- timing controller and gate ----
  logic rw, qa, al, nl, tla, clr, tlo, gate, busy;
  logic pr, ps, c1, c2;

  timing_controller u_timing (
    .clk     (clk),
    .rst_n   (rst_n),
    .sw_setup(sw6_setup),
    .sw_arm  (sw7_arm),
    .sw_start(sw8_start),
    .sw_write(sw9_write),
    .ps      (ps),
    .ss      (ss),
    .dis     (dis),
    .rw      (rw),
    .qa      (qa),
    .al      (al),
    .nl      (nl),
    .tla     (tla),
    .clr     (clr),
    .tlo     (tlo),
    .gate    (gate),
    .busy    (busy)
  );

  assign running = gate;

  // ---- address counter ----
  addr_t addr_i, addr_ii, run_addr;

  address_counter u_addr (
    .clk     (clk),
    .rst_n   (rst_n),
    .ss      (ss),
    .key_addr(key_addr),
    .al      (al),
    .qa      (qa),
    .clr     (clr || pr),
    .step    (c1),
    .addr_i  (addr_i),
    .addr_ii (addr_ii),
    .run_addr(run_addr)
  );

  // ---- master counter B, tau- and t_w-counter units ----
  exp_code_t  tau_exp, tw_exp;
  logic       ct1, ct2;
  logic [DECADES:0] taps_b, taps_a;
  logic       unit_clr;
  time_word_t mem1_word, mem1_disp, mem2_word, mem2_disp;
  bcd3_t      tau_count, tw_count;

  assign unit_clr = clr || pr || c1;

  master_counter #(.NDEC(DECADES)) u_master_b (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (unit_clr),
    .en    (gate),
    .sel_a (tau_exp),
    .sel_b (tw_exp),
    .tick_a(ct1),
    .tick_b(ct2),
    .taps  (taps_b)
  );

  counter_unit u_tau (
    .clk      (clk),
    .rst_n    (rst_n),
    .ss       (ss),
    .we       (rw),
    .waddr    (key_addr),
    .wdata    (key_word),
    .raddr    (addr_i),
    .clr      (unit_clr),
    .run_en   (1'b1),
    .tick     (ct1),
    .exp_code (tau_exp),
    .disp_word(mem1_disp),
    .word     (mem1_word),
    .coinc    (c1),
    .count    (tau_count)
  );

  counter_unit u_tw (
    .clk      (clk),
    .rst_n    (rst_n),
    .ss       (ss),
    .we       (rw),
    .waddr    (key_addr),
    .wdata    (key_word),
    .raddr    (addr_ii),
    .clr      (unit_clr),
    .run_en   (q0),
    .tick     (ct2),
    .exp_code (tw_exp),
    .disp_word(mem2_disp),
    .word     (mem2_word),
    .coinc    (c2),
    .count    (tw_count)
  );

  // ---- master counter A, T- and N-counters ----
  exp_code_t t_exp;
  logic      ct, ct_unused;
  bcd3_t     t_count, n_count;

  master_counter #(.NDEC(DECADES)) u_master_a (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr || pr),
    .en    (gate),
    .sel_a (t_exp),
    .sel_b ('0),
    .tick_a(ct),
    .tick_b(ct_unused),
    .taps  (taps_a)
  );

  t_counter u_t (
    .clk     (clk),
    .rst_n   (rst_n),
    .word    (mem1_word),
    .tla     (tla),
    .tlo     (tlo),
    .ct      (ct),
    .exp_code(t_exp),
    .pr      (pr),
    .count   (t_count)
  );

  n_counter u_n (
    .clk  (clk),
    .rst_n(rst_n),
    .word (mem1_word),
    .nl   (nl),
    .pr   (pr),
    .ps   (ps),
    .count(n_count)
  );

  assign trigger = pr;

  // ---- pulse generator ----
  pulse_generator u_pulse (
    .clk      (clk),
    .rst_n    (rst_n),
    .pr       (pr || clr),
    .c1       (c1),
    .c2       (c2),
    .negative (sw11_neg),
    .q        (q0),
    .pulse_out(pulse_out)
  );

  // ---- display side: Memory I word decoded for the display ----
  assign disp_mant = mem1_disp.mant;

  exp_encoder u_enc (
    .code    (mem1_disp.exp),
    .negative(disp_exp_neg),
    .mag     (disp_exp_mag)
  );

endmodule
