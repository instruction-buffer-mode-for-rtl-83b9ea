// workload_tb: task shapes of the evaluated applications on the full array.
//
// The five tasks (1D-DCT row, transposition, 1D-DCT column, alpha blender,
// SHA-1) are reproduced by their shape: number of configuration words
// (Conf_task), sequential contexts, inter-context loops with their context
// counts and iteration counts. The words are real configuration words (PE
// no-ops spread over the array plus one state-transition word per context);
// the arithmetic they do is not modelled, only the configuration traffic and
// the context sequencing, which is what the two execution modes change.
//
// Part 1 runs each task alone in multi-context mode and in instruction
// buffer mode and checks the cycle counts against the cost model of this
// controller:
//   multi-context: execution = Context_seq + sum(N_iteration * Context_loop),
//                  stall     = Conf_task + 3 (foreground load) + 2 per task
//   buffer mode:   execution = words of all executed contexts + 1
// and prints the first-order estimate Conf_context * Cycle_execution next to
// the measured buffer-mode count.
//
// Part 2 runs the five tasks in sequence ten times in three placements:
//   case 0: all multi-context (72 contexts, more than the 64 slots; SHA-1
//           shares slots 44..51 with the transposition task),
//   case 1: transposition in buffer mode (55 contexts, all resident),
//   case 2: the 8 initialisation contexts of SHA-1 in buffer mode (64
//           contexts, all resident).
// Checks: cases 1 and 2 load every multi-context task exactly once, case 0
// reloads evicted tasks every round, and execution cycles match the model.
module workload_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, tt_we, cm_we;
  logic [4:0] num_tasks; logic [15:0] repeat_cnt; logic [3:0] tt_addr; task_t tt_wdata;
  logic [9:0] cm_waddr; cfg_word_t cm_wdata;
  logic [3:0] mem_h_we; logic [7:0] mem_h_addr; logic [23:0] mem_h_wdata; logic [23:0] mem_h_rdata [4];
  logic [31:0] stat_total, stat_exec, stat_stall, stat_cfg_words, stat_preload_words,
               stat_resident_hits, stat_ib_contexts, stat_loop_jumps;

  muccra_top dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cm_loaded;   // words written into context memories
  always @(posedge clk) if (rst_n && dut.cfg_valid && !dut.cfg_to_ib) cm_loaded++;

  // ---------------- task shapes ----------------
  typedef struct {
    string name;
    int conf, pre, l0, it0, l1, it1, post;   // contexts: pre, loop0, loop1, post
    int slot0;                               // first context slot
    int base, len, nctx;                     // placement in configuration memory
    int off8;                                // word offset of context 8
    int ib_words;                            // words streamed in buffer mode
    int exec_mc;                             // contexts executed
  } shape_t;

  localparam int DCTR = 0, TRAN = 1, DCTC = 2, ALPH = 3, SHA = 4, SHAI = 5, SHAM = 6;
  shape_t sh [7];
  int wa;

  task automatic put(cfg_word_t w);
    @(negedge clk); cm_we = 1; cm_waddr = 10'(wa); cm_wdata = w; wa++;
    @(negedge clk); cm_we = 0;
  endtask

  // Words of one task: context c (slot slot0+c) gets an even share of the
  // task's words; its last word is the state-transition word.
  task automatic build(inout shape_t s);
    int k, w0, w1, ctx_words [64], tgt0, tgt1;
    cfg_word_t w; stc_cfg_t st; pe_cfg_t p;
    s.nctx = s.pre + s.l0 + s.l1 + s.post;
    s.base = wa; s.off8 = 0;
    tgt0 = s.pre; tgt1 = s.pre + s.l0;
    for (int c = 0; c < s.nctx; c++) begin
      if (c == 8) s.off8 = wa - s.base;
      w0 = (c * s.conf) / s.nctx; w1 = ((c + 1) * s.conf) / s.nctx;
      ctx_words[c] = w1 - w0;
      for (int j = 0; j < ctx_words[c] - 1; j++) begin
        p = '0; p.alu_op = ALU_ADD; p.src_a = SRC_IMM; p.src_b = SRC_IMM; p.imm = 16'(j);
        w.target = TGT_PE; w.row = 5'(1 << (j % 4)); w.col = 5'(1 << ((j / 4) % 4));
        w.ctx = 6'(s.slot0 + c); w.data = 64'(p);
        put(w);
      end
      st = '0;
      if (s.l0 > 0 && c == tgt0 + s.l0 - 1) begin st.loop_en = 1; st.loop_id = 0; st.target = 6'(s.slot0 + tgt0); end
      if (s.l1 > 0 && c == tgt1 + s.l1 - 1) begin st.loop_en = 1; st.loop_id = 1; st.target = 6'(s.slot0 + tgt1); end
      st.last = (c == s.nctx - 1);
      w = '0; w.target = TGT_STC; w.ctx = 6'(s.slot0 + c); w.data = 64'(st);
      put(w);
    end
    s.len = wa - s.base;
    s.ib_words = 0; s.exec_mc = 0;
    for (int c = 0; c < s.nctx; c++) begin
      k = 1;
      if (s.l0 > 0 && c >= tgt0 && c < tgt0 + s.l0) k = s.it0;
      if (s.l1 > 0 && c >= tgt1 && c < tgt1 + s.l1) k = s.it1;
      s.ib_words += k * ctx_words[c];
      s.exec_mc += k;
    end
  endtask

  task automatic put_task(int idx, shape_t s, bit mode);
    task_t t = '0;
    t.mode = mode; t.cfg_base = 10'(s.base); t.cfg_len = 11'(s.len);
    t.ctx_base = 6'(s.slot0); t.ctx_count = mode ? 7'd0 : 7'(s.nctx);
    t.iter0 = 8'(s.it0); t.iter1 = 8'(s.it1);
    @(negedge clk); tt_we = 1; tt_addr = 4'(idx); tt_wdata = t;
    @(negedge clk); tt_we = 0;
  endtask

  task automatic run(int ntask, int reps);
    num_tasks = 5'(ntask); repeat_cnt = 16'(reps);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    int est, exp_exec, mc_conf, n, cyc;
    start = 0; tt_we = 0; cm_we = 0; tt_addr = 0; tt_wdata = '0; cm_waddr = 0; cm_wdata = '0;
    mem_h_we = 0; mem_h_addr = 0; mem_h_wdata = 0; num_tasks = 0; repeat_cnt = 0;
    cm_loaded = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // name, Conf_task, pre, loop0, it0, loop1, it1, post, first slot
    sh[DCTR] = '{"1D-DCT(row)",    146, 1, 11, 8,   0, 0,  1, 0,  0, 0, 0, 0, 0, 0};
    sh[TRAN] = '{"Transposition",  208, 17, 0, 0,   0, 0,  0, 35, 0, 0, 0, 0, 0, 0};
    sh[DCTC] = '{"1D-DCT(column)", 151, 1, 12, 8,   0, 0,  1, 13, 0, 0, 0, 0, 0, 0};
    sh[ALPH] = '{"Alpha-Blender",   67, 1, 5, 128,  0, 0,  2, 27, 0, 0, 0, 0, 0, 0};
    sh[SHA]  = '{"SHA-1",          244, 8, 2, 20,   6, 75, 4, 44, 0, 0, 0, 0, 0, 0};
    wa = 0;
    for (int i = 0; i <= SHA; i++) build(sh[i]);
    // SHA-1 initialisation alone (8 contexts, for buffer mode in case 2)
    sh[SHAI] = '{"SHA-1 init", sh[SHA].off8, 8, 0, 0, 0, 0, 0, 44, 0, 0, 0, 0, 0, 0};
    build(sh[SHAI]);
    // SHA-1 without its initialisation: the same words from context 8 on
    sh[SHAM] = sh[SHA];
    sh[SHAM].name = "SHA-1 main"; sh[SHAM].base = sh[SHA].base + sh[SHA].off8;
    sh[SHAM].len = sh[SHA].len - sh[SHA].off8; sh[SHAM].slot0 = 52; sh[SHAM].nctx = 12;
    sh[SHAM].exec_mc = sh[SHA].exec_mc - 8;
    chk(wa <= 1024, "workloads fit the configuration memory");
    $display("configuration memory: %0d of 1024 words used", wa);

    // ---------------- part 1: single tasks ----------------
    for (int i = 0; i <= SHA; i++) begin
      put_task(0, sh[i], 0);
      cm_loaded = 0;
      run(1, 1);
      cyc = stat_total;
      chk(stat_exec == 32'(sh[i].exec_mc), $sformatf("%s multi-context execution %0d expected %0d", sh[i].name, stat_exec, sh[i].exec_mc));
      chk(stat_stall == 32'(sh[i].len + 3 + 2), $sformatf("%s stall %0d", sh[i].name, stat_stall));
      chk(cm_loaded == sh[i].len, $sformatf("%s words loaded %0d", sh[i].name, cm_loaded));
      cm_loaded = 0;
      run(1, 1);
      chk(cm_loaded == 0 && stat_resident_hits == 1 && stat_total == 32'(sh[i].exec_mc + 2),
          $sformatf("%s starts without transfer on its second run", sh[i].name));
      put_task(0, sh[i], 1);
      run(1, 1);
      chk(stat_exec == 32'(sh[i].ib_words + 1), $sformatf("%s buffer-mode cycles %0d expected %0d", sh[i].name, stat_exec, sh[i].ib_words + 1));
      est = (sh[i].len * sh[i].exec_mc * 10) / sh[i].nctx;
      $display("%-15s Conf=%0d contexts=%0d executed=%0d | multi-context total %0d | buffer mode total %0d, Conf_context*Cycle_execution = %0d.%0d",
               sh[i].name, sh[i].len, sh[i].nctx, sh[i].exec_mc, cyc, stat_total, est / 10, est % 10);
    end

    // ---------------- part 2: five tasks, ten rounds ----------------
    for (int cs = 0; cs < 3; cs++) begin
      n = 0; exp_exec = 0; mc_conf = 0;
      put_task(n++, sh[DCTR], 0); exp_exec += sh[DCTR].exec_mc; mc_conf += sh[DCTR].len;
      if (cs == 1) begin put_task(n++, sh[TRAN], 1); exp_exec += sh[TRAN].ib_words + 1; end
      else         begin put_task(n++, sh[TRAN], 0); exp_exec += sh[TRAN].exec_mc; mc_conf += sh[TRAN].len; end
      put_task(n++, sh[DCTC], 0); exp_exec += sh[DCTC].exec_mc; mc_conf += sh[DCTC].len;
      put_task(n++, sh[ALPH], 0); exp_exec += sh[ALPH].exec_mc; mc_conf += sh[ALPH].len;
      if (cs == 2) begin
        put_task(n++, sh[SHAI], 1); exp_exec += sh[SHAI].ib_words + 1;
        put_task(n++, sh[SHAM], 0); exp_exec += sh[SHAM].exec_mc; mc_conf += sh[SHAM].len;
      end else begin
        put_task(n++, sh[SHA], 0);  exp_exec += sh[SHA].exec_mc; mc_conf += sh[SHA].len;
      end
      cm_loaded = 0;
      run(n, 10);
      chk(stat_exec == 32'(10 * exp_exec), $sformatf("case %0d execution %0d expected %0d", cs, stat_exec, 10 * exp_exec));
      if (cs == 0) chk(cm_loaded > mc_conf, $sformatf("case 0 reloads evicted tasks (%0d words)", cm_loaded));
      else         chk(cm_loaded == mc_conf, $sformatf("case %0d loads each task once (%0d of %0d words)", cs, cm_loaded, mc_conf));
      $display("case %0d: total %0d, execution %0d, stall %0d, words loaded into context memories %0d (pre-loaded %0d)",
               cs, stat_total, stat_exec, stat_stall, cm_loaded, stat_preload_words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
