// mult_unit_tb: loads context words for low/high products with channel and
// immediate operands, then runs them from the context memory and from the
// instruction buffer, comparing with a signed 48-bit reference product.
module mult_unit_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_sel, cfg_to_ib, exec_en, exec_ib;
  logic [5:0] cfg_ctx, ctx_ptr; logic [63:0] cfg_data;
  word_t ch_in [4]; word_t mul_out;

  mult_unit dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t model(mul_cfg_t c);
    longint a, b, p;
    a = (c.sel_a < 4) ? longint'($signed(ch_in[c.sel_a[1:0]][23:0])) : 0;
    b = (c.sel_b < 4) ? longint'($signed(ch_in[c.sel_b[1:0]][23:0])) :
        (c.sel_b == 4) ? longint'($signed(c.imm)) : 0;
    p = a * b;
    if (c.op == MUL_LO) return {2'b00, p[23:0]};
    if (c.op == MUL_HI) return {2'b00, p[47:24]};
    return '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mul_cfg_t ctxw [64];
  initial begin
    mul_cfg_t w;
    cfg_sel = 0; cfg_to_ib = 0; exec_en = 0; exec_ib = 0; cfg_ctx = 0; ctx_ptr = 0; cfg_data = 0;
    for (int i = 0; i < 4; i++) ch_in[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 64; s++) begin
      @(negedge clk);
      w = '0; w.op = mul_op_e'($urandom_range(0, 2)); w.sel_a = 3'($urandom_range(0, 3));
      w.sel_b = 3'($urandom_range(0, 4)); w.imm = 16'($urandom);
      ctxw[s] = w; cfg_sel = 1; cfg_ctx = 6'(s); cfg_data = 64'(w);
    end
    @(negedge clk); cfg_sel = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) ch_in[i] = 26'($urandom);
      ctx_ptr = 6'($urandom); exec_en = 1;
      #1 chk(mul_out == model(ctxw[ctx_ptr]), $sformatf("context %0d", ctx_ptr));
    end
    // instruction buffer mode
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      w = '0; w.op = mul_op_e'($urandom_range(1, 2)); w.sel_a = 3'($urandom_range(0, 3));
      w.sel_b = 3'($urandom_range(0, 4)); w.imm = 16'($urandom);
      exec_ib = 1; exec_en = 0; cfg_sel = 1; cfg_to_ib = 1; cfg_data = 64'(w);
      @(negedge clk); cfg_sel = 0; exec_en = 1;
      for (int i = 0; i < 4; i++) ch_in[i] = 26'($urandom);
      #1 chk(mul_out == model(w), "buffer mode product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
