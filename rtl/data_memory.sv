// data_memory: one of the two data memories (Memory I or Memory II).
//
// 2^AW words of a time datum: three BCD digits and the 3-bit exponent code,
// 15 bits, built in the original from four 16x4 RAMs (the fourth holds the
// exponent code and has one bit spare). Reading is combinational from
// `raddr`, like the RAMs' asynchronous read; a write of `wdata` to `waddr`
// happens on the clock edge while `we` (RW) is high. The memory is not
// cleared at reset, as a RAM is not; the testbenches write before reading.
module data_memory
  import pp_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  time_word_t    wdata,
  input  logic [AW-1:0] raddr,
  output time_word_t    rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  time_word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
