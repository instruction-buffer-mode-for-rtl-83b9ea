// se_tb: random switch settings in all 64 contexts, then random inputs with
// a random context pointer; both channel registers are compared with a model
// (hold, the 16 sources, clear). Also checks buffer mode and that nothing
// changes without an execution cycle.
module se_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_sel, cfg_to_ib, exec_en, exec_ib;
  logic [5:0] cfg_ctx, ctx_ptr; logic [63:0] cfg_data;
  word_t nbr_in [8]; word_t pe_in [4]; word_t side_in [4]; word_t ch_out [2];
  se_cfg_t ctxw [64];
  word_t m [2];

  se dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t pick(logic [4:0] s, word_t old);
    if (s == 0) return old;
    if (s <= 8) return nbr_in[s - 1];
    if (s <= 12) return pe_in[s - 9];
    if (s <= 16) return side_in[s - 13];
    return '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic randin();
    for (int i = 0; i < 8; i++) nbr_in[i] = 26'($urandom);
    for (int i = 0; i < 4; i++) begin pe_in[i] = 26'($urandom); side_in[i] = 26'($urandom); end
  endtask

  initial begin
    se_cfg_t w;
    cfg_sel = 0; cfg_to_ib = 0; exec_en = 0; exec_ib = 0; cfg_ctx = 0; ctx_ptr = 0; cfg_data = 0;
    randin();
    repeat (2) @(posedge clk); rst_n = 1;
    m[0] = '0; m[1] = '0;
    for (int s = 0; s < 64; s++) begin
      @(negedge clk);
      w.sel0 = 5'($urandom_range(0, 17)); w.sel1 = 5'($urandom_range(0, 17));
      ctxw[s] = w; cfg_sel = 1; cfg_ctx = 6'(s); cfg_data = 64'(w);
    end
    @(negedge clk); cfg_sel = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk); randin(); ctx_ptr = 6'($urandom); exec_en = $urandom_range(0, 3) != 0;
      if (exec_en) begin
        m[0] = pick(ctxw[ctx_ptr].sel0, m[0]);
        m[1] = pick(ctxw[ctx_ptr].sel1, m[1]);
      end
      @(posedge clk); #1;
      chk(ch_out[0] == m[0] && ch_out[1] == m[1], $sformatf("context %0d", ctx_ptr));
    end
    // buffer mode: channel 0 takes PE SE-corner (12), channel 1 holds
    @(negedge clk); exec_en = 0; exec_ib = 1; w.sel0 = 5'd12; w.sel1 = 5'd0;
    cfg_sel = 1; cfg_to_ib = 1; cfg_data = 64'(w);
    @(negedge clk); cfg_sel = 0; exec_en = 1; randin(); m[0] = pe_in[3];
    @(posedge clk); #1 chk(ch_out[0] == m[0] && ch_out[1] == m[1], "buffer mode switch");
    @(negedge clk); randin();
    @(posedge clk); #1 chk(ch_out[0] == m[0], "empty buffer holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
