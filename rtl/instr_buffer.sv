// instr_buffer: one-entry instruction buffer and the mode-flag multiplexer.
//
// In instruction buffer mode a configuration word is not written into the
// context memory but into this single register, and the element executes it
// directly. The mode flag of the running task chooses what drives the
// element: the context-memory word at the context pointer (flag 0) or the
// buffer (flag 1).
//
// A valid bit marks a buffer written since the last execution cycle. In
// buffer mode an element whose buffer is not valid sees an all-zero word
// (no operation), so an element that the current context does not configure
// does not repeat an older instruction. The valid bit is cleared by an
// execution cycle in buffer mode; a write in the same cycle wins, which lets
// the next context's first word arrive while the current one executes.
//
// Interface: we/wdata from the configuration bus (already decoded for this
// element and for buffer mode), exec_en/exec_ib from the controller,
// cm_rdata from the element's context memory, cfg_out to the element.
// The one-register buffer and the mode multiplexer follow the described
// implementation; the valid bit is this design's choice.
module instr_buffer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] wdata,
  input  logic         exec_en,
  input  logic         exec_ib,
  input  logic [W-1:0] cm_rdata,
  output logic [W-1:0] cfg_out,
  output logic         ib_valid
);
  logic [W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q    <= '0;
      ib_valid <= 1'b0;
    end else if (we) begin
      buf_q    <= wdata;
      ib_valid <= 1'b1;
    end else if (exec_en && exec_ib) begin
      ib_valid <= 1'b0;
    end
  end

  always_comb begin
    if (exec_ib) cfg_out = ib_valid ? buf_q : '0;
    else         cfg_out = cm_rdata;
  end
endmodule
