// config_memory: the central configuration memory.
//
// Holds the configuration words of every task, each a RoMultiC-addressed bus
// word (cfg_word_t: element class, row and column multicast bits, context
// slot, 64 data bits). The controller reads one word per clock, in order, to
// load context memories or to feed the instruction buffers; the host writes
// it before a run.
//
// Timing: synchronous read, the word addressed in cycle t is on rdata in
// cycle t+1. The host port writes at the clock edge. Depth (1024 words) is
// this design's choice; the role of the memory follows the described array.
module config_memory
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = CM_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output cfg_word_t     rdata,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  cfg_word_t     h_wdata
);
  cfg_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (re)   rdata <= mem[raddr];
  end
endmodule
