// muccra_top: multi-context reconfigurable processor array with instruction
// buffer mode.
//
// A 4x4 array of 24-bit PEs sits in an island-style routing fabric: two
// routing channels run between the PEs, and a switching element (SE) at
// each of the 5x5 channel intersections steers words between neighbouring
// SEs, the four PEs around it and the edge units. Each PE reads its operands
// through a connection block from the eight channel words of its four corner
// SEs. One multiplier (MULT) on the left of each row is reached through the
// two left-edge SEs of that row; one 24-bit x 256 memory (MEM) below each
// column through the two bottom-edge SEs of that column.
//
// Every PE, SE, MULT and MEM has a 64-entry context memory and a one-entry
// instruction buffer. The controller reads the task program, streams
// configuration words from the central configuration memory over one
// RoMultiC multicast bus (row and column select bits), and either
//  - loads whole tasks into the context memories and runs them one context
//    per clock by broadcasting a context pointer (multi-context mode), with
//    background pre-load of the next task, or
//  - feeds the words straight into the instruction buffers and runs each
//    context as soon as its words are in (instruction buffer mode), so a
//    task with few active elements, or one whose same operation is
//    multicast to many PEs (SIMD style), needs no context memory at all.
//
// Host interface: write configuration words (cm_*), task descriptors (tt_*),
// set num_tasks / repeat_cnt and pulse start; busy/done and the statistics
// counters report progress. Input data and results go through the MEM host
// ports (mem_h_*), used while the array is idle.
//
// Sizes follow MuCCRA-1 (4x4 PEs, 24-bit data with 2-bit carry, 64 contexts,
// 64-bit PE context word, 4 MULTs, 4 MEMs of 24 x 256). The routing
// topology details, the SE/MULT/MEM context words, the configuration memory
// size and the host interface are this design's choices. The decoder's
// state-transition select (stc_sel) is left unconnected here: the controller
// recognises its own state-transition words on the bus it drives.
module muccra_top
  import muccra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // program control
  input  logic               start,
  input  logic [TASK_AW:0]   num_tasks,
  input  logic [15:0]        repeat_cnt,
  output logic               busy,
  output logic               done,
  // task table
  input  logic               tt_we,
  input  logic [TASK_AW-1:0] tt_addr,
  input  task_t              tt_wdata,
  // central configuration memory write port
  input  logic               cm_we,
  input  logic [CM_AW-1:0]   cm_waddr,
  input  cfg_word_t          cm_wdata,
  // MEM host ports
  input  logic [COLS-1:0]    mem_h_we,
  input  logic [MEM_AW-1:0]  mem_h_addr,
  input  logic [DW-1:0]      mem_h_wdata,
  output logic [DW-1:0]      mem_h_rdata [COLS],
  // statistics
  output logic [31:0]        stat_total,
  output logic [31:0]        stat_exec,
  output logic [31:0]        stat_stall,
  output logic [31:0]        stat_cfg_words,
  output logic [31:0]        stat_preload_words,
  output logic [31:0]        stat_resident_hits,
  output logic [31:0]        stat_ib_contexts,
  output logic [31:0]        stat_loop_jumps
);
  // ---------------- controller and configuration memory ----------------
  logic              cm_re;
  logic [CM_AW-1:0]  cm_raddr;
  cfg_word_t         cm_rdata;
  logic              cfg_valid, cfg_to_ib;
  cfg_word_t         cfg_word;
  logic [CTX_AW-1:0] ctx_ptr;
  logic              exec_en, exec_ib;

  config_memory u_cfgmem (
    .clk, .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata),
    .h_we(cm_we), .h_addr(cm_waddr), .h_wdata(cm_wdata)
  );

  controller u_ctrl (
    .clk, .rst_n, .start, .num_tasks, .repeat_cnt, .tt_we, .tt_addr, .tt_wdata,
    .busy, .done, .cm_re, .cm_raddr, .cm_rdata,
    .cfg_valid, .cfg_to_ib, .cfg_word, .ctx_ptr, .exec_en, .exec_ib,
    .stat_total, .stat_exec, .stat_stall, .stat_cfg_words, .stat_preload_words,
    .stat_resident_hits, .stat_ib_contexts, .stat_loop_jumps
  );

  // ---------------- RoMultiC decode ----------------
  logic [ROWS*COLS-1:0]       pe_sel;
  logic [SE_ROWS*SE_COLS-1:0] se_sel;
  logic [ROWS-1:0]            mult_sel;
  logic [COLS-1:0]            mem_sel;
  logic                       stc_sel;

  romultic_decoder u_dec (
    .valid(cfg_valid), .target(cfg_word.target), .row(cfg_word.row), .col(cfg_word.col),
    .pe_sel, .se_sel, .mult_sel, .mem_sel, .stc_sel
  );

  // ---------------- array wiring ----------------
  word_t se_ch   [SE_ROWS][SE_COLS][NCH];
  word_t pe_out  [ROWS][COLS];
  word_t mul_out [ROWS];
  word_t mem_out [COLS];

  for (genvar r = 0; r < SE_ROWS; r++) begin : g_se_r
    for (genvar c = 0; c < SE_COLS; c++) begin : g_se_c
      word_t nbr [8];
      word_t pin [4];
      word_t side [4];
      always_comb begin
        for (int k = 0; k < 2; k++) begin
          nbr[0+k] = (r > 0)           ? se_ch[(r > 0 ? r-1 : 0)][c][k] : '0;
          nbr[2+k] = (r < SE_ROWS-1)   ? se_ch[(r < SE_ROWS-1 ? r+1 : r)][c][k] : '0;
          nbr[4+k] = (c < SE_COLS-1)   ? se_ch[r][(c < SE_COLS-1 ? c+1 : c)][k] : '0;
          nbr[6+k] = (c > 0)           ? se_ch[r][(c > 0 ? c-1 : 0)][k] : '0;
        end
        pin[0]  = (r > 0 && c > 0)       ? pe_out[(r > 0 ? r-1 : 0)][(c > 0 ? c-1 : 0)] : '0;
        pin[1]  = (r > 0 && c < COLS)    ? pe_out[(r > 0 ? r-1 : 0)][(c < COLS ? c : 0)] : '0;
        pin[2]  = (r < ROWS && c > 0)    ? pe_out[(r < ROWS ? r : 0)][(c > 0 ? c-1 : 0)] : '0;
        pin[3]  = (r < ROWS && c < COLS) ? pe_out[(r < ROWS ? r : 0)][(c < COLS ? c : 0)] : '0;
        side[0] = (c == 0 && r > 0)            ? mul_out[(r > 0 ? r-1 : 0)] : '0;
        side[1] = (c == 0 && r < ROWS)         ? mul_out[(r < ROWS ? r : 0)] : '0;
        side[2] = (r == SE_ROWS-1 && c > 0)    ? mem_out[(c > 0 ? c-1 : 0)] : '0;
        side[3] = (r == SE_ROWS-1 && c < COLS) ? mem_out[(c < COLS ? c : 0)] : '0;
      end

      se u_se (
        .clk, .rst_n, .cfg_sel(se_sel[r*SE_COLS+c]), .cfg_to_ib, .cfg_ctx(cfg_word.ctx),
        .cfg_data(cfg_word.data), .ctx_ptr, .exec_en, .exec_ib,
        .nbr_in(nbr), .pe_in(pin), .side_in(side), .ch_out(se_ch[r][c])
      );
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_pe_r
    for (genvar c = 0; c < COLS; c++) begin : g_pe_c
      word_t cb [8];
      always_comb begin
        for (int k = 0; k < 2; k++) begin
          cb[0+k] = se_ch[r][c][k];
          cb[2+k] = se_ch[r][c+1][k];
          cb[4+k] = se_ch[r+1][c][k];
          cb[6+k] = se_ch[r+1][c+1][k];
        end
      end

      pe u_pe (
        .clk, .rst_n, .cfg_sel(pe_sel[r*COLS+c]), .cfg_to_ib, .cfg_ctx(cfg_word.ctx),
        .cfg_data(cfg_word.data), .ctx_ptr, .exec_en, .exec_ib,
        .cb_in(cb), .pe_out(pe_out[r][c])
      );
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_mult
    word_t mch [4];
    always_comb begin
      for (int k = 0; k < 2; k++) begin
        mch[0+k] = se_ch[r][0][k];
        mch[2+k] = se_ch[r+1][0][k];
      end
    end

    mult_unit u_mult (
      .clk, .rst_n, .cfg_sel(mult_sel[r]), .cfg_to_ib, .cfg_ctx(cfg_word.ctx),
      .cfg_data(cfg_word.data), .ctx_ptr, .exec_en, .exec_ib,
      .ch_in(mch), .mul_out(mul_out[r])
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_mem
    word_t dch [4];
    always_comb begin
      for (int k = 0; k < 2; k++) begin
        dch[0+k] = se_ch[SE_ROWS-1][c][k];
        dch[2+k] = se_ch[SE_ROWS-1][c+1][k];
      end
    end

    mem_unit u_mem (
      .clk, .rst_n, .cfg_sel(mem_sel[c]), .cfg_to_ib, .cfg_ctx(cfg_word.ctx),
      .cfg_data(cfg_word.data), .ctx_ptr, .exec_en, .exec_ib,
      .ch_in(dch), .mem_out(mem_out[c]),
      .h_we(mem_h_we[c]), .h_addr(mem_h_addr), .h_wdata(mem_h_wdata),
      .h_rdata(mem_h_rdata[c])
    );
  end
endmodule
