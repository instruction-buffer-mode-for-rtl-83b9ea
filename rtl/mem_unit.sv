// mem_unit: distributed data memory below one column of the PE array.
//
// 256 words of 24 bits. In an execution cycle the context word can read or
// write one location. The address is an 8-bit offset from the context word
// added to the low 8 bits of a channel word (or to zero); the write data is
// one of the four channel words of the two bottom-edge SEs next to the unit
// (left SE ch0, ch1, right SE ch0, ch1). A read lands in the output register
// at the end of the cycle, so the SEs can pick it up one context later. The
// output register holds its value otherwise.
//
// A second, host-side port (h_*) loads input data and fetches results while
// the array does not use the memory: writes from the array take priority in
// the same cycle; the host read is asynchronous.
//
// 24-bit x 256 and the place (one per column, bottom) follow MuCCRA-1; the
// addressing, the output register and the host port are this design's
// choices.
module mem_unit
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
  output word_t             mem_out,
  input  logic              h_we,
  input  logic [MEM_AW-1:0] h_addr,
  input  logic [DW-1:0]     h_wdata,
  output logic [DW-1:0]     h_rdata
);
  logic [MEM_CFG_W-1:0] cfg_word;
  mem_cfg_t             cfg;
  logic [MEM_AW-1:0]    addr;
  logic [DW-1:0]        mem [MEM_DEPTH];

  config_store #(.W(MEM_CFG_W), .DEPTH(CTX_DEPTH)) u_cs (
    .clk, .rst_n, .sel(cfg_sel), .to_ib(cfg_to_ib), .wctx(cfg_ctx),
    .wdata(cfg_data[MEM_CFG_W-1:0]), .ctx_ptr, .exec_en, .exec_ib,
    .cfg_out(cfg_word)
  );

  assign cfg  = mem_cfg_t'(cfg_word);
  assign addr = ((cfg.addr_sel == 2'd3) ? '0 : ch_in[cfg.addr_sel][MEM_AW-1:0]) + cfg.offset;

  always_ff @(posedge clk) begin
    if (exec_en && cfg.op == MOP_WRITE) mem[addr] <= ch_in[cfg.data_sel][DW-1:0];
    else if (h_we)                      mem[h_addr] <= h_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               mem_out <= '0;
    else if (exec_en && cfg.op == MOP_READ)   mem_out <= {{CYW{1'b0}}, mem[addr]};
  end

  assign h_rdata = mem[h_addr];
endmodule
