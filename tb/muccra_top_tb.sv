// muccra_top_tb: the whole array, at its default size, running a small
// program that mixes both execution modes, twice over.
//
//   T0 init  (instruction buffer mode): PE(3,1) clears its loop index r0.
//   T1 scale (multi-context, slots 0..4, loop of 5 contexts, N iterations):
//        PE(3,1) sends i to SE(4,1); MEM0 reads A[i]; SE(4,0) picks it up;
//        MULT3 forms 3*A[i] and PE(3,0) forms A[i] + (A[i] << 2) = 5*A[i];
//        MEM0[128+i] <= 3*A[i], MEM1[i] <= 5*A[i]; PE(3,1) increments i.
//   T3 copy  (multi-context, slots 8..10): MEM2[10] <= MEM1[3] through SE(4,2);
//        pre-loaded in the background while T1 runs.
//   T2 summary (instruction buffer mode, SIMD): one multicast word configures
//        all sixteen PEs (r0 + 0x55), one word the four bottom SEs, one word
//        the four MEMs: MEMc[250] <= r0 of PE(3,c) + 0x55.
//
// Checks the memory results against values computed here, and that each
// mechanism happened: foreground load with the array stalled, background
// pre-load, start of a resident task with no transfer, buffer-mode contexts,
// multicast of one word to several elements, inter-context loop jumps, and
// the execution/stall cycle counts that follow from the program. Finally T1
// is switched to instruction buffer mode and run on new data: its results
// must not change, and its cost becomes one cycle per streamed word.
module muccra_top_tb;
  import muccra_pkg::*;
  localparam int N = 16;
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
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters observed on the configuration bus
  int n_multicast, n_stall_cycles;
  always @(posedge clk) if (rst_n) begin
    if (dut.cfg_valid && ($countones(dut.pe_sel) + $countones(dut.se_sel) + $countones(dut.mem_sel)
                          + $countones(dut.mult_sel)) > 1) n_multicast++;
    if (busy && !dut.exec_en && dut.cfg_valid && !dut.cfg_to_ib) n_stall_cycles++;
  end

  // ---------------- configuration word builders ----------------
  int wa;
  task automatic put(cfg_word_t w);
    @(negedge clk); cm_we = 1; cm_waddr = 10'(wa); cm_wdata = w; wa++;
    @(negedge clk); cm_we = 0;
  endtask
  function automatic cfg_word_t mk(target_e t, logic [4:0] row, logic [4:0] col, int ctx, logic [63:0] d);
    cfg_word_t w; w.target = t; w.row = row; w.col = col; w.ctx = 6'(ctx); w.data = d; return w;
  endfunction
  function automatic logic [4:0] bit5(int i); return 5'(1 << i); endfunction
  function automatic cfg_word_t pe_w(int r, int c, int ctx, pe_cfg_t p);
    return mk(TGT_PE, bit5(r), bit5(c), ctx, 64'(p));
  endfunction
  function automatic cfg_word_t se_w(int r, int c, int ctx, int s0, int s1);
    se_cfg_t s; s.sel0 = 5'(s0); s.sel1 = 5'(s1);
    return mk(TGT_SE, bit5(r), bit5(c), ctx, 64'(s));
  endfunction
  function automatic cfg_word_t mem_w(logic [4:0] cols, int ctx, mem_op_e op, int asel, int off, int dsel);
    mem_cfg_t m = '0; m.op = op; m.addr_sel = 2'(asel); m.offset = 8'(off); m.data_sel = 2'(dsel);
    return mk(TGT_MEM, 5'b0, cols, ctx, 64'(m));
  endfunction
  function automatic cfg_word_t stc_w(int ctx, bit last, bit loop_en, int tgt);
    stc_cfg_t s = '0; s.last = last; s.loop_en = loop_en; s.target = 6'(tgt);
    return mk(TGT_STC, 5'b0, 5'b0, ctx, 64'(s));
  endfunction
  function automatic pe_cfg_t pecfg(alu_op_e op, src_e a, src_e b, int imm, bit we, int wa_, int ra, smu_op_e sop, int sh);
    pe_cfg_t p = '0; p.alu_op = op; p.src_a = a; p.src_b = b; p.imm = 16'(imm); p.rf_we = we;
    p.rf_wa = 3'(wa_); p.rf_ra = 3'(ra); p.smu_op = sop; p.shamt = 5'(sh); return p;
  endfunction

  task automatic put_task(int idx, bit mode, int base, int len, int cbase, int ccount, int it);
    task_t t = '0;
    t.mode = mode; t.cfg_base = 10'(base); t.cfg_len = 11'(len); t.ctx_base = 6'(cbase);
    t.ctx_count = 7'(ccount); t.iter0 = 8'(it);
    @(negedge clk); tt_we = 1; tt_addr = 4'(idx); tt_wdata = t;
    @(negedge clk); tt_we = 0;
  endtask

  logic [23:0] A [N];

  initial begin
    mul_cfg_t mc;
    int b0, b1, b3, b2, l0, l1, l3, l2, exp_exec, exp_stall;
    start = 0; tt_we = 0; cm_we = 0; tt_addr = 0; tt_wdata = '0; cm_waddr = 0; cm_wdata = '0;
    mem_h_we = 0; mem_h_addr = 0; mem_h_wdata = 0; num_tasks = 4; repeat_cnt = 2;
    n_multicast = 0; n_stall_cycles = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // input data A[i] in MEM0[0..N-1]
    for (int i = 0; i < N; i++) begin
      A[i] = 24'($urandom);
      @(negedge clk); mem_h_we = 4'b0001; mem_h_addr = 8'(i); mem_h_wdata = A[i];
    end
    @(negedge clk); mem_h_we = 0;

    // T0 init (buffer mode)
    wa = 0; b0 = wa;
    put(pe_w(3, 1, 0, pecfg(ALU_PASSB, SRC_ZERO, SRC_IMM, 0, 1, 0, 0, SMU_PASS, 0)));
    put(stc_w(0, 1, 0, 0));
    l0 = wa - b0;
    // T1 scale loop (multi-context, slots 0..4)
    b1 = wa;
    put(pe_w(3, 1, 0, pecfg(ALU_PASSA, SRC_RFA, SRC_ZERO, 0, 0, 0, 0, SMU_PASS, 0)));
    put(se_w(4, 1, 0, 10, 0));
    put(stc_w(0, 0, 0, 0));
    put(mem_w(5'b00001, 1, MOP_READ, 2, 0, 0));
    put(pe_w(3, 1, 1, pecfg(ALU_ADD, SRC_RFA, SRC_IMM, 1, 1, 0, 0, SMU_PASS, 0)));
    put(stc_w(1, 0, 0, 0));
    put(se_w(4, 0, 2, 16, 0));
    put(stc_w(2, 0, 0, 0));
    mc = '0; mc.op = MUL_LO; mc.sel_a = 3'd2; mc.sel_b = 3'd4; mc.imm = 16'd3;
    put(mk(TGT_MULT, 5'b01000, 5'b0, 3, 64'(mc)));
    put(se_w(4, 0, 3, 0, 13));
    put(pe_w(3, 0, 3, pecfg(ALU_ADD, SRC_CB4, SRC_CB4, 0, 0, 0, 0, SMU_SHL, 2)));
    put(se_w(4, 1, 3, 0, 9));
    put(stc_w(3, 0, 0, 0));
    put(mem_w(5'b00001, 4, MOP_WRITE, 2, 128, 1));
    put(mem_w(5'b00010, 4, MOP_WRITE, 0, 0, 1));
    put(stc_w(4, 1, 1, 0));
    l1 = wa - b1;
    // T3 copy (multi-context, slots 8..10)
    b3 = wa;
    put(mem_w(5'b00010, 8, MOP_READ, 3, 3, 0));
    put(stc_w(8, 0, 0, 0));
    put(se_w(4, 2, 9, 15, 0));
    put(stc_w(9, 0, 0, 0));
    put(mem_w(5'b00100, 10, MOP_WRITE, 3, 10, 0));
    put(stc_w(10, 1, 0, 0));
    l3 = wa - b3;
    // T2 summary (buffer mode, SIMD multicast)
    b2 = wa;
    put(mk(TGT_PE, 5'b01111, 5'b01111, 0, 64'(pecfg(ALU_ADD, SRC_RFA, SRC_IMM, 'h55, 0, 0, 0, SMU_PASS, 0))));
    put(mk(TGT_SE, 5'b10000, 5'b01111, 0, 64'(se_cfg_t'({5'd0, 5'd10}))));
    put(stc_w(0, 0, 0, 0));
    put(mem_w(5'b01111, 1, MOP_WRITE, 3, 250, 0));
    put(stc_w(1, 1, 0, 0));
    l2 = wa - b2;

    put_task(0, 1, b0, l0, 0, 0, 0);
    put_task(1, 0, b1, l1, 0, 5, N);
    put_task(2, 0, b3, l3, 8, 3, 0);
    put_task(3, 1, b2, l2, 0, 0, 0);

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);

    // results
    for (int i = 0; i < N; i++) begin
      mem_h_addr = 8'(128 + i); #1 chk(mem_h_rdata[0] == 24'(A[i] * 3), $sformatf("MEM0[%0d] = 3*A", 128 + i));
      mem_h_addr = 8'(i);       #1 chk(mem_h_rdata[1] == 24'(A[i] * 5), $sformatf("MEM1[%0d] = 5*A", i));
    end
    mem_h_addr = 8'd10; #1 chk(mem_h_rdata[2] == 24'(A[3] * 5), "MEM2[10] = MEM1[3]");
    mem_h_addr = 8'd250; #1;
    for (int c = 0; c < 4; c++)
      chk(mem_h_rdata[c] == ((c == 1) ? 24'(N + 'h55) : 24'h55), $sformatf("SIMD summary MEM%0d[250]", c));

    // mechanisms
    chk(n_stall_cycles > 0, "foreground load with the array stalled");
    chk(stat_preload_words == 32'(l3), $sformatf("background pre-load words %0d", stat_preload_words));
    chk(stat_resident_hits == 3, $sformatf("resident task starts %0d", stat_resident_hits));
    chk(stat_ib_contexts == 6, $sformatf("buffer-mode contexts %0d", stat_ib_contexts));
    chk(n_multicast >= 6, $sformatf("multicast words %0d", n_multicast));
    chk(stat_loop_jumps == 2 * (N - 1), $sformatf("loop jumps %0d", stat_loop_jumps));
    // cycle counts: multi-context tasks one cycle per context; buffer-mode
    // tasks one cycle per word plus one of read latency; stalls two per task
    // plus the one foreground load (words + 3).
    exp_exec  = 2 * ((l0 + 1) + 5 * N + 3 + (l2 + 1));
    exp_stall = 2 * 4 * 2 + (l1 + 3);
    chk(stat_exec == 32'(exp_exec), $sformatf("execution cycles %0d expected %0d", stat_exec, exp_exec));
    chk(stat_stall == 32'(exp_stall), $sformatf("stall cycles %0d expected %0d", stat_stall, exp_stall));
    $display("mechanisms: stall-load cycles %0d, pre-load words %0d, resident starts %0d, buffer contexts %0d, multicast words %0d, loop jumps %0d",
             n_stall_cycles, stat_preload_words, stat_resident_hits, stat_ib_contexts, n_multicast, stat_loop_jumps);
    $display("cycles: total %0d execution %0d stall %0d", stat_total, stat_exec, stat_stall);

    // mode switch: the same configuration words of T1 run in buffer mode on
    // new input data give the same results, without using context slots
    for (int i = 0; i < N; i++) begin
      A[i] = 24'($urandom);
      @(negedge clk); mem_h_we = 4'b0001; mem_h_addr = 8'(i); mem_h_wdata = A[i];
    end
    @(negedge clk); mem_h_we = 0;
    put_task(1, 1, b1, l1, 0, 0, N);
    num_tasks = 2; repeat_cnt = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      mem_h_addr = 8'(128 + i); #1 chk(mem_h_rdata[0] == 24'(A[i] * 3), $sformatf("buffer mode: MEM0[%0d] = 3*A", 128 + i));
      mem_h_addr = 8'(i);       #1 chk(mem_h_rdata[1] == 24'(A[i] * 5), $sformatf("buffer mode: MEM1[%0d] = 5*A", i));
    end
    chk(stat_ib_contexts == 32'(1 + 5 * N), $sformatf("buffer-mode contexts of the looped task %0d", stat_ib_contexts));
    chk(stat_exec == 32'((l0 + 1) + (N * l1 + 1)), $sformatf("buffer-mode execution cycles %0d expected %0d", stat_exec, (l0 + 1) + (N * l1 + 1)));
    chk(stat_stall == 32'(2 * 2) && stat_cfg_words == 32'(l0 + N * l1), "buffer mode: no load stall, every loop pass re-streamed");
    $display("looped task in buffer mode: execution %0d cycles (multi-context: %0d)", stat_exec - (l0 + 1), 5 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
