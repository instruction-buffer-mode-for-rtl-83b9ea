// pe: one processing element tile of the array.
//
// Combines the PE core with the element's configuration storage: a 64-entry
// context memory of 64-bit words and the one-entry instruction buffer. The
// word the core executes comes from the context memory at the broadcast
// context pointer in multi-context mode, or from the instruction buffer in
// instruction buffer mode (exec_ib). Configuration words reach the tile over
// the shared configuration bus; cfg_sel is this tile's RoMultiC select.
//
// Timing: configuration writes take effect at the clock edge; a word written
// to the buffer can be executed in the very next cycle. Data timing is that
// of pe_core. Organisation follows MuCCRA-1 with the instruction buffer mode.
module pe
  import muccra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_sel,
  input  logic              cfg_to_ib,
  input  logic [CTX_AW-1:0] cfg_ctx,
  input  logic [CFG_DW-1:0] cfg_data,
  input  logic [CTX_AW-1:0] ctx_ptr,
  input  logic              exec_en,
  input  logic              exec_ib,
  input  word_t             cb_in [8],
  output word_t             pe_out
);
  logic [PE_CFG_W-1:0] cfg_word;

  config_store #(.W(PE_CFG_W), .DEPTH(CTX_DEPTH)) u_cs (
    .clk, .rst_n, .sel(cfg_sel), .to_ib(cfg_to_ib), .wctx(cfg_ctx),
    .wdata(cfg_data[PE_CFG_W-1:0]), .ctx_ptr, .exec_en, .exec_ib,
    .cfg_out(cfg_word)
  );

  pe_core u_core (
    .clk, .rst_n, .cfg(pe_cfg_t'(cfg_word)), .exec_en, .cb_in, .pe_out
  );
endmodule
