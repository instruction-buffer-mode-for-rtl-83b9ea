// mult_unit: the multiplier beside one row of the PE array.
//
// Multiplies two signed 24-bit operands and returns either the low or the
// high 24 bits of the 48-bit product. Operand A comes from one of the four
// channel words of the two left-edge SEs next to the unit (upper SE ch0,
// ch1, lower SE ch0, ch1); operand B from the same four or from a
// sign-extended 16-bit immediate. Like a PE the unit has a context memory and
// an instruction buffer and is configured over the configuration bus.
//
// Timing: combinational from operands to mul_out within one execution cycle;
// the adjacent SEs register the result. Carry bits of the result are zero.
// The unit's place (one per row, left side) follows MuCCRA-1; the operation
// set and the operand sources are this design's choices.
module mult_unit
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
  input  word_t             ch_in [4],
  output word_t             mul_out
);
  logic [MUL_CFG_W-1:0] cfg_word;
  mul_cfg_t             cfg;
  logic [DW-1:0]        a, b;
  logic [2*DW-1:0]      p;

  config_store #(.W(MUL_CFG_W), .DEPTH(CTX_DEPTH)) u_cs (
    .clk, .rst_n, .sel(cfg_sel), .to_ib(cfg_to_ib), .wctx(cfg_ctx),
    .wdata(cfg_data[MUL_CFG_W-1:0]), .ctx_ptr, .exec_en, .exec_ib,
    .cfg_out(cfg_word)
  );

  assign cfg = mul_cfg_t'(cfg_word);

  always_comb begin
    a = (cfg.sel_a < 3'd4) ? ch_in[cfg.sel_a[1:0]][DW-1:0] : '0;
    if (cfg.sel_b < 3'd4)       b = ch_in[cfg.sel_b[1:0]][DW-1:0];
    else if (cfg.sel_b == 3'd4) b = {{(DW-16){cfg.imm[15]}}, cfg.imm};
    else                        b = '0;
    p = $signed(a) * $signed(b);
    unique case (cfg.op)
      MUL_LO:  mul_out = {{CYW{1'b0}}, p[DW-1:0]};
      MUL_HI:  mul_out = {{CYW{1'b0}}, p[2*DW-1:DW]};
      default: mul_out = '0;
    endcase
  end
endmodule
