// pe_rfile: PE register file, 8 entries of 26 bits (24 data + 2 carry).
//
// Two asynchronous read ports feed the operand multiplexers; one write port
// stores the PE result at the end of an execution cycle (we is already
// qualified by the controller's execute enable). Reset clears all entries.
// Size follows MuCCRA-1; the port count is this design's choice.
module pe_rfile
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = RF_DEPTH,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output word_t         rdata_a,
  output word_t         rdata_b
);
  word_t rf [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) rf[i] <= '0;
    end else if (we) begin
      rf[waddr] <= wdata;
    end
  end

  assign rdata_a = rf[raddr_a];
  assign rdata_b = rf[raddr_b];
endmodule
