// config_store: context memory plus instruction buffer of one element.
//
// Takes the configuration bus as seen by one element (sel already decoded by
// the RoMultiC decoder) and routes the word either into the context memory
// slot named by the bus (to_ib = 0, multi-context mode) or into the
// instruction buffer (to_ib = 1). cfg_out is the word the element executes
// this cycle: context memory at ctx_ptr, or the buffer when exec_ib is set.
// Purely structural; timing is that of its two parts. The buffer's valid
// flag is only needed inside instr_buffer and is not brought out.
module config_store #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  logic          to_ib,
  input  logic [AW-1:0] wctx,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] ctx_ptr,
  input  logic          exec_en,
  input  logic          exec_ib,
  output logic [W-1:0]  cfg_out
);
  logic [W-1:0] cm_rdata;
  logic         ib_valid;

  context_memory #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_cm (
    .clk, .rst_n, .we(sel && !to_ib), .waddr(wctx), .wdata,
    .raddr(ctx_ptr), .rdata(cm_rdata)
  );

  instr_buffer #(.W(W)) u_ib (
    .clk, .rst_n, .we(sel && to_ib), .wdata, .exec_en, .exec_ib,
    .cm_rdata, .cfg_out, .ib_valid
  );
endmodule
