// pe_tb: a PE tile run in both modes. Context slots are loaded over the
// configuration bus with "add operand + immediate" words; the context
// pointer then walks the slots and the output is checked. In buffer mode,
// a word written to the buffer runs in the next cycle, and an execution cycle
// with an empty buffer neither produces a result nor writes a register.
module pe_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_sel, cfg_to_ib, exec_en, exec_ib;
  logic [5:0] cfg_ctx, ctx_ptr; logic [63:0] cfg_data;
  word_t cb_in [8]; word_t pe_out;

  pe dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic pe_cfg_t addimm(int cb, int imm, bit we, int wa);
    pe_cfg_t c = '0;
    c.alu_op = ALU_ADD; c.src_a = src_e'(cb); c.src_b = SRC_IMM; c.imm = 16'(imm);
    c.rf_we = we; c.rf_wa = 3'(wa);
    return c;
  endfunction

  initial begin
    pe_cfg_t c;
    logic [23:0] e;
    cfg_sel = 0; cfg_to_ib = 0; exec_en = 0; exec_ib = 0; cfg_ctx = 0; ctx_ptr = 0; cfg_data = 0;
    for (int i = 0; i < 8; i++) cb_in[i] = 26'(i * 1000 + 7);
    repeat (2) @(posedge clk); rst_n = 1;
    // multi-context: load slot s with "cb[s%8] + s"
    for (int s = 0; s < 64; s++) begin
      @(negedge clk); cfg_sel = 1; cfg_ctx = 6'(s); cfg_data = 64'(addimm(s % 8, s, 0, 0));
    end
    @(negedge clk); cfg_sel = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); ctx_ptr = 6'($urandom); exec_en = 1;
      e = cb_in[ctx_ptr % 8][23:0] + 24'(ctx_ptr);
      #1 chk(pe_out[23:0] == e, $sformatf("context %0d", ctx_ptr));
    end
    // buffer mode: write, then execute next cycle; store into r3
    @(negedge clk); exec_en = 0; exec_ib = 1;
    c = addimm(2, 100, 1, 3); cfg_sel = 1; cfg_to_ib = 1; cfg_data = 64'(c);
    #1 chk(pe_out == '0, "empty buffer is a no-op");
    @(negedge clk); cfg_sel = 0; exec_en = 1;
    #1 chk(pe_out[23:0] == cb_in[2][23:0] + 24'd100, "buffer word executes");
    @(negedge clk); exec_en = 1;   // buffer now empty: must not overwrite r3
    #1 chk(pe_out == '0, "buffer consumed");
    @(negedge clk); exec_en = 0;
    c = '0; c.alu_op = ALU_PASSA; c.src_a = SRC_RFA; c.rf_ra = 3'd3;
    cfg_sel = 1; cfg_data = 64'(c);
    @(negedge clk); cfg_sel = 0; exec_en = 1;
    #1 chk(pe_out[23:0] == cb_in[2][23:0] + 24'd100, "register written in buffer mode");
    // back to multi-context mode: context memory untouched by buffer use
    @(negedge clk); exec_ib = 0; cfg_to_ib = 0; ctx_ptr = 6'd9;
    #1 chk(pe_out[23:0] == cb_in[1][23:0] + 24'd9, "context memory kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
