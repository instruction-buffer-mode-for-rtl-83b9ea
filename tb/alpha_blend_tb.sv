// alpha_blend_tb: an alpha-blending kernel computed on the full array, in
// both execution modes, from the same configuration words.
//
// out[i] = B[i] + (((A[i] - B[i]) * alpha) >>> 8) for NPIX 8-bit pixels,
// A in MEM0[0..], B in MEM1[0..], result written to MEM0[128 + i].
// NPIX = 128 loop iterations, the iteration count of the evaluated
// alpha-blender task. One task: context 0 clears the pixel index (PE(3,1)
// register r0), contexts 1..7 form the loop body, one pixel per pass:
//   1: PE(3,1) drives i; SE(4,1) ch0 takes it
//   2: MEM0 and MEM1 read at i (address from SE(4,1) ch0); PE(3,1) i += 1
//   3: SE(4,1) ch0 <= A (MEM0 output), ch1 <= B (MEM1 output)
//   4: PE(3,0) computes A - B from SE(4,1); SE(4,0) ch0 takes it
//   5: MULT3 multiplies SE(4,0) ch0 by alpha; SE(4,0) ch1 takes the product
//   6: PE(3,0) adds B and product >>> 8 (shift & mask unit); SE(4,0) ch0
//      takes it; PE(3,1) drives i - 1 onto SE(4,1) ch0
//   7: MEM0 writes SE(4,0) ch0 at 128 + SE(4,1) ch0; loop back to 1.
// The task runs once in multi-context mode (slots 0..7) and once in
// instruction buffer mode on new pixels. Both results are checked against
// a model here, and the cycle counts against the controller's cost model:
// multi-context execution 1 + 7 * NPIX, buffer mode one cycle per streamed
// word plus one.
module alpha_blend_tb;
  import muccra_pkg::*;
  localparam int NPIX  = 128;
  localparam int ALPHA = 77;
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
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
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

  logic [23:0] A [NPIX], B [NPIX];

  task automatic load_pixels();
    for (int i = 0; i < NPIX; i++) begin
      A[i] = 24'($urandom_range(255)); B[i] = 24'($urandom_range(255));
      @(negedge clk); mem_h_we = 4'b0001; mem_h_addr = 8'(i); mem_h_wdata = A[i];
      @(negedge clk); mem_h_we = 4'b0010; mem_h_addr = 8'(i); mem_h_wdata = B[i];
    end
    @(negedge clk); mem_h_we = 0;
  endtask

  task automatic check_pixels(string mode);
    int d, exp_v;
    for (int i = 0; i < NPIX; i++) begin
      d = int'(A[i]) - int'(B[i]);
      exp_v = int'(B[i]) + ((d * ALPHA) >>> 8);
      mem_h_addr = 8'(128 + i); #1;
      chk(mem_h_rdata[0] == 24'(exp_v), $sformatf("%s pixel %0d: %0d expected %0d", mode, i, mem_h_rdata[0], exp_v));
    end
  endtask

  task automatic run_task();
    num_tasks = 1; repeat_cnt = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask

  initial begin
    mul_cfg_t mc;
    int b, len, w0;
    start = 0; tt_we = 0; cm_we = 0; tt_addr = 0; tt_wdata = '0; cm_waddr = 0; cm_wdata = '0;
    mem_h_we = 0; mem_h_addr = 0; mem_h_wdata = 0; num_tasks = 0; repeat_cnt = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    wa = 0; b = wa;
    // 0: i = 0
    put(pe_w(3, 1, 0, pecfg(ALU_PASSB, SRC_ZERO, SRC_IMM, 0, 1, 0, 0, SMU_PASS, 0)));
    put(stc_w(0, 0, 0, 0));
    w0 = wa - b;
    // 1: drive i
    put(pe_w(3, 1, 1, pecfg(ALU_PASSA, SRC_RFA, SRC_ZERO, 0, 0, 0, 0, SMU_PASS, 0)));
    put(se_w(4, 1, 1, 10, 0));
    put(stc_w(1, 0, 0, 0));
    // 2: read A[i], B[i]; i += 1
    put(mem_w(5'b00001, 2, MOP_READ, 2, 0, 0));
    put(mem_w(5'b00010, 2, MOP_READ, 0, 0, 0));
    put(pe_w(3, 1, 2, pecfg(ALU_ADD, SRC_RFA, SRC_IMM, 1, 1, 0, 0, SMU_PASS, 0)));
    put(stc_w(2, 0, 0, 0));
    // 3: A, B onto SE(4,1)
    put(se_w(4, 1, 3, 15, 16));
    put(stc_w(3, 0, 0, 0));
    // 4: A - B
    put(pe_w(3, 0, 4, pecfg(ALU_SUB, SRC_CB6, SRC_CB7, 0, 0, 0, 0, SMU_PASS, 0)));
    put(se_w(4, 0, 4, 10, 0));
    put(stc_w(4, 0, 0, 0));
    // 5: (A - B) * alpha
    mc = '0; mc.op = MUL_LO; mc.sel_a = 3'd2; mc.sel_b = 3'd4; mc.imm = 16'(ALPHA);
    put(mk(TGT_MULT, 5'b01000, 5'b0, 5, 64'(mc)));
    put(se_w(4, 0, 5, 0, 13));
    put(stc_w(5, 0, 0, 0));
    // 6: B + (product >>> 8); i - 1 for the write address
    put(pe_w(3, 0, 6, pecfg(ALU_ADD, SRC_CB7, SRC_CB5, 0, 0, 0, 0, SMU_SRA, 8)));
    put(se_w(4, 0, 6, 10, 0));
    put(pe_w(3, 1, 6, pecfg(ALU_ADD, SRC_RFA, SRC_IMM, -1, 0, 0, 0, SMU_PASS, 0)));
    put(se_w(4, 1, 6, 10, 0));
    put(stc_w(6, 0, 0, 0));
    // 7: MEM0[128 + i] <= result
    put(mem_w(5'b00001, 7, MOP_WRITE, 2, 128, 0));
    put(stc_w(7, 1, 1, 1));
    len = wa - b;

    // multi-context mode
    load_pixels();
    put_task(0, 0, b, len, 0, 8, NPIX);
    run_task();
    check_pixels("multi-context");
    chk(stat_exec == 32'(1 + 7 * NPIX), $sformatf("multi-context execution %0d expected %0d", stat_exec, 1 + 7 * NPIX));
    chk(stat_stall == 32'(len + 3 + 2), $sformatf("multi-context stall %0d expected %0d", stat_stall, len + 3 + 2));
    chk(stat_loop_jumps == 32'(NPIX - 1), $sformatf("loop jumps %0d", stat_loop_jumps));
    $display("multi-context: total %0d, execution %0d, load and task stalls %0d", stat_total, stat_exec, stat_stall);

    // instruction buffer mode, same words, new pixels
    load_pixels();
    put_task(0, 1, b, len, 0, 0, NPIX);
    run_task();
    check_pixels("buffer mode");
    chk(stat_exec == 32'(w0 + NPIX * (len - w0) + 1),
        $sformatf("buffer-mode execution %0d expected %0d", stat_exec, w0 + NPIX * (len - w0) + 1));
    chk(stat_ib_contexts == 32'(1 + 7 * NPIX), $sformatf("buffer-mode contexts %0d", stat_ib_contexts));
    $display("buffer mode:   total %0d, execution %0d (Conf_context * Cycle_execution = %0d)",
             stat_total, stat_exec, (len * (1 + 7 * NPIX)) / 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
