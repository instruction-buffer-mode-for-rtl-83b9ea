// controller_tb: the controller against a behavioural configuration memory.
//
// Program (run twice):
//   task 0, multi-context, slots 0..3: context 0, loop body 1..2 run three
//           times, context 3 ends the task (8 context executions, 8 words);
//   task 1, multi-context, slots 10..11: two contexts (4 words), which must
//           be pre-loaded in the background while task 0 runs;
//   task 2, instruction buffer: contexts of 3, 2 and 1 words, contexts 0..1
//           looped twice (11 words streamed, 5 executions).
// Checks: the executed context sequence, the mode flag on every execution,
// which words go to the buffers, the cycle counts (execution, stalls), that
// the second run transfers nothing for the resident tasks, pre-load and
// loop counts.
module controller_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, tt_we, busy, done, cm_re, cfg_valid, cfg_to_ib, exec_en, exec_ib;
  logic [4:0] num_tasks; logic [15:0] repeat_cnt; logic [3:0] tt_addr; task_t tt_wdata;
  logic [9:0] cm_raddr; cfg_word_t cm_rdata, cfg_word; logic [5:0] ctx_ptr;
  logic [31:0] stat_total, stat_exec, stat_stall, stat_cfg_words, stat_preload_words,
               stat_resident_hits, stat_ib_contexts, stat_loop_jumps;

  controller dut (.*);

  // behavioural configuration memory, one cycle read latency
  cfg_word_t cmem [1024];
  always_ff @(posedge clk) if (cm_re) cm_rdata <= cmem[cm_raddr];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cfg_word_t pew(int ctx, int tag);
    cfg_word_t w = '0;
    w.target = TGT_PE; w.row = 5'b00001; w.col = 5'b00001; w.ctx = 6'(ctx); w.data = 64'(tag);
    return w;
  endfunction
  function automatic cfg_word_t stcw(int ctx, bit last, bit loop_en, bit id, int tgt);
    cfg_word_t w = '0; stc_cfg_t s = '0;
    s.last = last; s.loop_en = loop_en; s.loop_id = id; s.target = 6'(tgt);
    w.target = TGT_STC; w.ctx = 6'(ctx); w.data = 64'(s);
    return w;
  endfunction

  // trace of executions: {ib, ctx} for multi-context, 'h100 + count for buffer mode
  int trace [$];
  int ib_words, mc_words;
  always @(posedge clk) if (rst_n) begin
    if (exec_en) trace.push_back(exec_ib ? 1000 : int'(ctx_ptr));
    if (cfg_valid && cfg_to_ib) ib_words++;
    if (cfg_valid && !cfg_to_ib) mc_words++;
  end

  task automatic put_task(int idx, task_t t);
    @(negedge clk); tt_we = 1; tt_addr = 4'(idx); tt_wdata = t;
    @(negedge clk); tt_we = 0;
  endtask

  initial begin
    task_t t;
    int a, exp1 [$], exp [$], t0;
    start = 0; tt_we = 0; tt_addr = 0; tt_wdata = '0; num_tasks = 3; repeat_cnt = 2;
    ib_words = 0; mc_words = 0;
    // task 0 words at 0..7
    a = 0;
    cmem[a++] = pew(0, 1); cmem[a++] = stcw(0, 0, 0, 0, 0);
    cmem[a++] = pew(1, 2); cmem[a++] = stcw(1, 0, 0, 0, 0);
    cmem[a++] = pew(2, 3); cmem[a++] = stcw(2, 0, 1, 0, 1);
    cmem[a++] = pew(3, 4); cmem[a++] = stcw(3, 1, 0, 0, 0);
    // task 1 words at 100..103
    cmem[100] = pew(10, 5); cmem[101] = stcw(10, 0, 0, 0, 0);
    cmem[102] = pew(11, 6); cmem[103] = stcw(11, 1, 0, 0, 0);
    // task 2 (buffer mode) at 200..: ctx0 3 words, ctx1 2 words (loop id 1), ctx2 1 word
    cmem[200] = pew(0, 7); cmem[201] = pew(0, 8); cmem[202] = stcw(0, 0, 0, 0, 0);
    cmem[203] = pew(1, 9); cmem[204] = stcw(1, 0, 1, 1, 0);
    cmem[205] = stcw(2, 1, 0, 0, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    t = '0; t.mode = 0; t.cfg_base = 0;   t.cfg_len = 8; t.ctx_base = 0;  t.ctx_count = 4; t.iter0 = 3; put_task(0, t);
    t = '0; t.mode = 0; t.cfg_base = 100; t.cfg_len = 4; t.ctx_base = 10; t.ctx_count = 2; put_task(1, t);
    t = '0; t.mode = 1; t.cfg_base = 200; t.cfg_len = 6; t.iter1 = 2; put_task(2, t);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    exp1 = '{0, 1, 2, 1, 2, 1, 2, 3, 10, 11, 1000, 1000, 1000, 1000, 1000};
    exp = {exp1, exp1};
    chk(trace.size() == exp.size(), $sformatf("execution count %0d", trace.size()));
    for (int i = 0; i < exp.size() && i < trace.size(); i++)
      chk(trace[i] == exp[i], $sformatf("execution %0d: %0d expected %0d", i, trace[i], exp[i]));
    chk(ib_words == 22, $sformatf("words to instruction buffers %0d", ib_words));
    chk(mc_words == 12, $sformatf("words to context memories %0d (each task loaded once)", mc_words));
    chk(stat_preload_words == 4, $sformatf("pre-loaded words %0d", stat_preload_words));
    chk(stat_resident_hits == 3, $sformatf("tasks started without transfer %0d", stat_resident_hits));
    chk(stat_ib_contexts == 10, "buffer-mode contexts");
    chk(stat_loop_jumps == 6, $sformatf("loop jumps %0d", stat_loop_jumps));
    // execution: 2 x (8 + 2 multi-context contexts + 11 streamed words
    // + 1 cycle of configuration-memory read latency at the buffer task start)
    chk(stat_exec == 44, $sformatf("execution cycles %0d", stat_exec));
    // stalls: 2 per task (fetch, advance) x 6, plus the foreground load of
    // task 0 (8 words + 3 cycles of read latency and hand-over)
    chk(stat_stall == 12 + 11, $sformatf("stall cycles %0d", stat_stall));
    chk(stat_total == stat_exec + stat_stall, "total = execution + stall");
    chk(stat_cfg_words == 34, "words on the bus");
    $display("total %0d exec %0d stall %0d", stat_total, stat_exec, stat_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
