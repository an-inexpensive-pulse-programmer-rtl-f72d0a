// address_counter: addresses of Memory I and Memory II.
//
// A 4-bit binary counter whose most significant bit is wired as the least
// significant address bit: address = {cnt[2:0], cnt[3]}. One count step
// (the coincidence pulse C1, `step`) therefore moves the address up by 2:
// 0, 2, 4, ... 14, then 1, 3, ... `al` loads address 8 + `qa` (9 for N
// while QA is high, 8 for T after it falls); `clr` (CLR or PR) clears it to
// address 0 and wins over `al` and `step`.
// In setup mode (ss high) both memories take the keyboard address
// `key_addr`. In run mode Memory I takes the counter's address and Memory
// II one less (modulo 16), so while tau_i is compared in Memory I the
// width t_w of the pulse just started is compared in Memory II.
// The rotated counter, the SS multiplexer and the a-1 offset follow the
// original; the load value 8 + QA is this design's reading of the start
// sequence.
module address_counter
  import pp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ss,
  input  addr_t key_addr,
  input  logic  al,
  input  logic  qa,
  input  logic  clr,
  input  logic  step,
  output addr_t addr_i,
  output addr_t addr_ii,
  output addr_t run_addr
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0] cnt;
  addr_t      load_addr;

  assign load_addr = ADDR_T | addr_t'(qa);
  assign run_addr  = {cnt[2:0], cnt[3]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (clr)  cnt <= '0;
    else if (al)   cnt <= {load_addr[0], load_addr[3:1]};
    else if (step) cnt <= cnt + 4'd1;
  end

  assign addr_i  = ss ? key_addr : run_addr;
  assign addr_ii = ss ? key_addr : run_addr - addr_t'(1);

endmodule
