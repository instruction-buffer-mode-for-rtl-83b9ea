// context_memory: the per-element store of hardware contexts.
//
// Every reconfigurable element (PE, SE, MULT, MEM and the sequencer) keeps
// DEPTH configuration words, one per hardware context. The central controller
// broadcasts a context pointer; the word at that slot is read out
// combinationally and drives the element for the current cycle, so switching
// context takes no extra cycle. Words are written one at a time from the
// configuration bus, at the slot named in the bus word.
//
// Interface: we/waddr/wdata write port (one word per clock), raddr/rdata
// asynchronous read port. Reset clears every slot to zero, which every
// element decodes as "no operation", so a slot that was never loaded is
// harmless. DEPTH = 64 and W = 64 (the PE word) follow the MuCCRA-1 array;
// the clearing reset is this design's choice.
module context_memory #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
