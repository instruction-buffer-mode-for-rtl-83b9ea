// controller: central controller and state-transition sequencer.
//
// Runs a program of tasks, each described by a task-table entry (task_t)
// whose mode flag selects how the task is executed:
//
//  * mode 0, multi-context mode: all configuration words of the task are
//    transferred from the central configuration memory into the context
//    memories (one word per clock, RoMultiC-addressed) before the task runs.
//    The task then executes one context per clock: the context pointer is
//    broadcast to every element and advanced by the state-transition words
//    held in this controller's own 64-entry context memory. A task whose
//    context slots still hold its configuration is started without any
//    transfer. While a mode-0 task executes, the next task of the program
//    is pre-loaded in the background if it is a mode-0 task, is not already
//    resident, and its context slots do not overlap the running task's.
//
//  * mode 1, instruction buffer mode: nothing is written into the context
//    memories. Configuration words stream from the configuration memory
//    straight into the elements' instruction buffers, and every context is
//    executed in the cycle its last word (the state-transition word) arrives.
//    A context of k words therefore costs k cycles, and the next context's
//    first word is delivered in the following cycle. Loops re-fetch the
//    loop body from the configuration memory: the address of the first word
//    of each context is remembered so that a loop-back can jump to it.
//
// Context sequencing (both modes) uses one state-transition word (stc_cfg_t)
// per context, which is also the last configuration word of that context:
// "last" ends the task; "loop_en" marks the end of a loop body and jumps back
// to "target" while loop counter loop_id (two per task, loaded from the task
// descriptor) has iterations left. A task thus runs
// Context_seq + N_iteration * Context_loop contexts.
//
// Timing: the configuration memory has one cycle read latency. Its read
// data is forwarded to the array unchanged as cfg_word; cfg_valid and
// cfg_to_ib, registered here, say whether and where the word is taken.
// Each task costs two extra cycles (descriptor fetch and task advance). Statistics
// count total, execution (array busy in either mode) and stall cycles
// (descriptor fetch, waiting for a foreground load, task advance).
// An assertion checks that the loader and the buffer streamer never read
// the configuration memory in the same cycle; reset also disables it, which
// is why rst_n appears in a synchronous context as well.
//
// The two modes, the mode flag read per task, loading before execution,
// background pre-load during execution and one-word-at-a-time buffer
// execution follow the described controller. Descriptor layout, the
// residency tracking (a rewritten task-table entry loses its residency),
// the overlap rule for pre-load, the state-transition word format and the
// statistics are this design's choices.
module controller
  import muccra_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host control
  input  logic               start,
  input  logic [TASK_AW:0]   num_tasks,
  input  logic [15:0]        repeat_cnt,
  input  logic               tt_we,
  input  logic [TASK_AW-1:0] tt_addr,
  input  task_t              tt_wdata,
  output logic               busy,
  output logic               done,
  // configuration memory read port
  output logic               cm_re,
  output logic [CM_AW-1:0]   cm_raddr,
  input  cfg_word_t          cm_rdata,
  // configuration bus to the array
  output logic               cfg_valid,
  output logic               cfg_to_ib,
  output cfg_word_t          cfg_word,
  // execution control to the array
  output logic [CTX_AW-1:0]  ctx_ptr,
  output logic               exec_en,
  output logic               exec_ib,
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
  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_WAIT_LOAD, S_EXEC_MC, S_IB, S_NEXT, S_DONE
  } state_e;

  state_e             state;
  task_t              tt [NTASK];
  logic [TASK_AW-1:0] ti;          // current task index
  logic [15:0]        rep;         // program repetitions left
  task_t              cur;
  logic [CTX_AW-1:0]  cp;          // context pointer
  logic [7:0]         lcnt [2];    // loop counters

  // state-transition context memory
  stc_cfg_t           stc_mem [CTX_DEPTH];

  // residency of context slots
  logic [CTX_DEPTH-1:0] slot_valid;
  logic [TASK_AW-1:0]   slot_owner [CTX_DEPTH];

  // loader (multi-context transfer)
  logic               ld_busy;
  logic [TASK_AW-1:0] ld_task;
  logic [CM_AW-1:0]   ld_ptr;
  logic [CM_AW:0]     ld_left;
  logic               ld_bg;       // current load is a background pre-load

  // instruction-buffer streamer
  logic [CM_AW-1:0]   ib_ptr;
  logic               ib_first;
  logic [CM_AW-1:0]   ib_ctx_addr [CTX_DEPTH];

  // read pipeline: what arrives on cm_rdata this cycle
  logic               rv_ld, rv_ib;
  logic [CM_AW-1:0]   rv_addr;

  // ------------------------------------------------------------------
  function automatic logic in_range(int s, logic [CTX_AW-1:0] base, logic [CTX_AW:0] cnt);
    return (s >= int'(base)) && (s < int'(base) + int'(cnt));
  endfunction

  function automatic logic is_resident(logic [TASK_AW-1:0] id, task_t t,
                                       logic [CTX_DEPTH-1:0] v,
                                       logic [TASK_AW-1:0] own [CTX_DEPTH]);
    logic ok = 1'b1;
    for (int s = 0; s < int'(CTX_DEPTH); s++)
      if (in_range(s, t.ctx_base, t.ctx_count) && !(v[s] && own[s] == id)) ok = 1'b0;
    return ok;
  endfunction

  function automatic logic overlaps(task_t a, task_t b);
    return (int'(a.ctx_base) < int'(b.ctx_base) + int'(b.ctx_count)) &&
           (int'(b.ctx_base) < int'(a.ctx_base) + int'(a.ctx_count));
  endfunction

  // ------------------------------------------------------------------
  // next task of the program, and whether one exists
  logic [TASK_AW-1:0] nt;
  logic               nt_exists;
  task_t              nt_desc, ti_desc;
  logic               ti_resident, nt_resident;

  always_comb begin
    if ({1'b0, ti} + 1'b1 >= num_tasks) begin
      nt        = '0;
      nt_exists = (rep > 16'd1);
    end else begin
      nt        = ti + 1'b1;
      nt_exists = 1'b1;
    end
    nt_desc     = tt[nt];
    ti_desc     = tt[ti];
    ti_resident = is_resident(ti, ti_desc, slot_valid, slot_owner);
    nt_resident = is_resident(nt, nt_desc, slot_valid, slot_owner);
  end

  // ------------------------------------------------------------------
  // state-transition decision for the current context
  stc_cfg_t stc;
  logic     stc_here;     // a context ends this cycle
  logic     take_jump, task_end;

  always_comb begin
    stc      = '0;
    stc_here = 1'b0;
    if (state == S_EXEC_MC) begin
      stc      = stc_mem[cp];
      stc_here = 1'b1;
    end else if (state == S_IB && rv_ib && cm_rdata.target == TGT_STC) begin
      stc      = stc_cfg_t'(cm_rdata.data[STC_CFG_W-1:0]);
      stc_here = 1'b1;
    end
    take_jump = stc_here && stc.loop_en && (lcnt[stc.loop_id] > 8'd1);
    task_end  = stc_here && stc.last && !take_jump;
  end

  // ------------------------------------------------------------------
  // configuration-memory read issue
  logic ld_issue, ib_issue;
  logic [CM_AW-1:0] ib_addr;

  always_comb begin
    ld_issue = ld_busy && (ld_left != '0);
    ib_issue = (state == S_IB) && !task_end;
    ib_addr  = take_jump ? ib_ctx_addr[stc.target] : ib_ptr;
    cm_re    = ld_issue || ib_issue;
    cm_raddr = ld_issue ? ld_ptr : ib_addr;
  end

  // configuration bus and execution control
  always_comb begin
    cfg_valid = rv_ld || rv_ib;
    cfg_to_ib = rv_ib;
    cfg_word  = cm_rdata;
    ctx_ptr   = cp;
    exec_ib   = (state == S_IB);
    exec_en   = (state == S_EXEC_MC) || ((state == S_IB) && stc_here);
    busy      = (state != S_IDLE) && (state != S_DONE);
    done      = (state == S_DONE);
  end

  // start a background pre-load this cycle?
  logic bg_start;
  assign bg_start = (state == S_EXEC_MC) && !ld_busy && nt_exists && (nt != ti) &&
                    !nt_desc.mode && !nt_resident && !overlaps(nt_desc, cur);

  // foreground load start
  logic fg_start;
  assign fg_start = (state == S_FETCH) && !ti_desc.mode && !ti_resident && !ld_busy;

  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ti         <= '0;
      rep        <= '0;
      cur        <= '0;
      cp         <= '0;
      lcnt[0]    <= '0;
      lcnt[1]    <= '0;
      slot_valid <= '0;
      ld_busy    <= 1'b0;
      ld_task    <= '0;
      ld_ptr     <= '0;
      ld_left    <= '0;
      ld_bg      <= 1'b0;
      ib_ptr     <= '0;
      ib_first   <= 1'b0;
      rv_ld      <= 1'b0;
      rv_ib      <= 1'b0;
      rv_addr    <= '0;
      stat_total <= '0;
      stat_exec  <= '0;
      stat_stall <= '0;
      stat_cfg_words     <= '0;
      stat_preload_words <= '0;
      stat_resident_hits <= '0;
      stat_ib_contexts   <= '0;
      stat_loop_jumps    <= '0;
      for (int s = 0; s < int'(CTX_DEPTH); s++) begin
        stc_mem[s]     <= '0;
        slot_owner[s]  <= '0;
        ib_ctx_addr[s] <= '0;
      end
      for (int i = 0; i < int'(NTASK); i++) tt[i] <= '0;
    end else begin
      // a rewritten descriptor is a new task: its old slots no longer count
      if (tt_we) begin
        tt[tt_addr] <= tt_wdata;
        for (int s = 0; s < int'(CTX_DEPTH); s++)
          if (slot_owner[s] == tt_addr) slot_valid[s] <= 1'b0;
      end

      // read pipeline
      rv_ld   <= ld_issue;
      rv_ib   <= ib_issue && !ld_issue;
      rv_addr <= cm_raddr;

      // state-transition words loaded into the sequencer's context memory
      if (rv_ld && cm_rdata.target == TGT_STC)
        stc_mem[cm_rdata.ctx] <= stc_cfg_t'(cm_rdata.data[STC_CFG_W-1:0]);
      if (cfg_valid) stat_cfg_words <= stat_cfg_words + 1;
      if (rv_ld && ld_bg) stat_preload_words <= stat_preload_words + 1;

      // loader
      if (ld_issue) begin
        ld_ptr  <= ld_ptr + 1'b1;
        ld_left <= ld_left - 1'b1;
      end
      if (ld_busy && ld_left == '0 && !rv_ld) begin
        ld_busy <= 1'b0;
        for (int s = 0; s < int'(CTX_DEPTH); s++)
          if (in_range(s, tt[ld_task].ctx_base, tt[ld_task].ctx_count)) begin
            slot_valid[s] <= 1'b1;
            slot_owner[s] <= ld_task;
          end
      end
      if (fg_start || bg_start) begin
        ld_busy <= 1'b1;
        ld_task <= fg_start ? ti : nt;
        ld_ptr  <= fg_start ? ti_desc.cfg_base : nt_desc.cfg_base;
        ld_left <= fg_start ? ti_desc.cfg_len  : nt_desc.cfg_len;
        ld_bg   <= bg_start;
        for (int s = 0; s < int'(CTX_DEPTH); s++)
          if (fg_start ? in_range(s, ti_desc.ctx_base, ti_desc.ctx_count)
                       : in_range(s, nt_desc.ctx_base, nt_desc.ctx_count))
            slot_valid[s] <= 1'b0;
      end

      // loop counters and context pointer
      if (stc_here) begin
        if (take_jump) begin
          lcnt[stc.loop_id] <= lcnt[stc.loop_id] - 1'b1;
          stat_loop_jumps   <= stat_loop_jumps + 1;
        end else if (stc.loop_en) begin
          lcnt[stc.loop_id] <= stc.loop_id ? cur.iter1 : cur.iter0;
        end
      end

      // instruction-buffer streamer bookkeeping
      if (ib_issue && !ld_issue) ib_ptr <= ib_addr + 1'b1;
      if (state == S_IB && rv_ib) begin
        if (ib_first) ib_ctx_addr[cm_rdata.ctx] <= rv_addr;
        ib_first <= (cm_rdata.target == TGT_STC);
        if (cm_rdata.target == TGT_STC) stat_ib_contexts <= stat_ib_contexts + 1;
      end

      // statistics
      if (busy) stat_total <= stat_total + 1;
      if (state == S_EXEC_MC || state == S_IB) stat_exec <= stat_exec + 1;
      if (state == S_FETCH || state == S_WAIT_LOAD || state == S_NEXT) stat_stall <= stat_stall + 1;

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            ti         <= '0;
            rep        <= repeat_cnt;
            stat_total <= '0;
            stat_exec  <= '0;
            stat_stall <= '0;
            stat_cfg_words     <= '0;
            stat_preload_words <= '0;
            stat_resident_hits <= '0;
            stat_ib_contexts   <= '0;
            stat_loop_jumps    <= '0;
            state <= (num_tasks == '0 || repeat_cnt == '0) ? S_DONE : S_FETCH;
          end
        end
        S_FETCH: begin
          cur     <= ti_desc;
          cp      <= ti_desc.ctx_base;
          lcnt[0] <= ti_desc.iter0;
          lcnt[1] <= ti_desc.iter1;
          if (ti_desc.mode) begin
            ib_ptr   <= ti_desc.cfg_base;
            ib_first <= 1'b1;
            state    <= S_IB;
          end else if (ti_resident && !(ld_busy && ld_task == ti)) begin
            stat_resident_hits <= stat_resident_hits + 1;
            state <= S_EXEC_MC;
          end else begin
            state <= S_WAIT_LOAD;
          end
        end
        S_WAIT_LOAD: begin
          if (!ld_busy) state <= S_EXEC_MC;
        end
        S_EXEC_MC: begin
          if (task_end)       state <= S_NEXT;
          else if (take_jump) cp <= stc.target;
          else                cp <= cp + 1'b1;
        end
        S_IB: begin
          if (task_end) state <= S_NEXT;
        end
        S_NEXT: begin
          if ({1'b0, ti} + 1'b1 >= num_tasks) begin
            ti <= '0;
            if (rep <= 16'd1) begin
              rep   <= '0;
              state <= S_DONE;
            end else begin
              rep   <= rep - 1'b1;
              state <= S_FETCH;
            end
          end else begin
            ti    <= ti + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The streamer and the loader never issue in the same cycle: pre-loads only
  // start in multi-context execution, and a buffer-mode task starts only
  // after its descriptor fetch, when no pre-load targets it.
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) !(ld_issue && ib_issue))
    else $error("loader and instruction-buffer streamer both read the configuration memory");
endmodule
