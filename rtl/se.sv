// se: switching element at one intersection of the routing channels.
//
// The array has two routing channels. The SE holds one multiplexer-based
// switch per channel; each switch takes one of the words entering the
// intersection and drives it onto its channel towards the neighbouring SEs,
// the connection blocks of the four surrounding PEs, and the MULT or MEM on
// the array edge. Sources, by select value:
//   0      hold (the channel keeps its word; an unconfigured SE does this)
//   1..8   neighbour SE channels: N0 N1 S0 S1 E0 E1 W0 W1
//   9..12  PE outputs: NW NE SW SE of the intersection
//   13,14  MULT output above / below (left edge SEs only)
//   15,16  MEM output left / right (bottom edge SEs only)
//   17     clear to zero
// Each switch output is a register updated at the end of an execution cycle
// (exec_en), so a chain of switches cannot form a combinational loop and a
// word advances one SE per context. The SE's 10-bit context word comes from
// its own context memory or instruction buffer.
//
// Two multiplexer switches with a context memory follow MuCCRA-1; the source
// list, the registered outputs and the encoding are this design's choices.
module se
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
  input  word_t             nbr_in  [8],
  input  word_t             pe_in   [4],
  input  word_t             side_in [4],
  output word_t             ch_out  [NCH]
);
  logic [SE_CFG_W-1:0] cfg_word;
  se_cfg_t             cfg;
  logic [4:0]          sel [NCH];
  word_t               src [SE_SRC_N];

  config_store #(.W(SE_CFG_W), .DEPTH(CTX_DEPTH)) u_cs (
    .clk, .rst_n, .sel(cfg_sel), .to_ib(cfg_to_ib), .wctx(cfg_ctx),
    .wdata(cfg_data[SE_CFG_W-1:0]), .ctx_ptr, .exec_en, .exec_ib,
    .cfg_out(cfg_word)
  );

  assign cfg    = se_cfg_t'(cfg_word);
  assign sel[0] = cfg.sel0;
  assign sel[1] = cfg.sel1;

  always_comb begin
    src[0] = '0;
    for (int i = 0; i < 8; i++) src[1+i]  = nbr_in[i];
    for (int i = 0; i < 4; i++) src[9+i]  = pe_in[i];
    for (int i = 0; i < 4; i++) src[13+i] = side_in[i];
    src[17] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NCH); k++) ch_out[k] <= '0;
    end else if (exec_en) begin
      for (int k = 0; k < int'(NCH); k++)
        if (sel[k] != SW_HOLD && int'(sel[k]) < int'(SE_SRC_N))
          ch_out[k] <= src[sel[k]];
    end
  end
endmodule
