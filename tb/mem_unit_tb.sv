// mem_unit_tb: host loads data, the array reads it with channel+offset
// addressing (result one cycle later in the output register), the array
// writes channel data, and the host reads everything back against a shadow.
module mem_unit_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_sel, cfg_to_ib, exec_en, exec_ib;
  logic [5:0] cfg_ctx, ctx_ptr; logic [63:0] cfg_data;
  word_t ch_in [4]; word_t mem_out;
  logic h_we; logic [7:0] h_addr; logic [23:0] h_wdata, h_rdata;
  logic [23:0] shadow [256];

  mem_unit dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mem_cfg_t w;
    logic [7:0] a;
    cfg_sel = 0; cfg_to_ib = 0; exec_en = 0; exec_ib = 1; cfg_ctx = 0; ctx_ptr = 0; cfg_data = 0;
    h_we = 0; h_addr = 0; h_wdata = 0;
    for (int i = 0; i < 4; i++) ch_in[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); h_we = 1; h_addr = 8'(i); h_wdata = 24'($urandom); shadow[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) ch_in[i] = 26'($urandom);
      w = '0; w.op = ($urandom_range(0, 1) == 1) ? MOP_READ : MOP_WRITE;
      w.addr_sel = 2'($urandom); w.data_sel = 2'($urandom); w.offset = 8'($urandom);
      a = ((w.addr_sel == 3) ? 8'd0 : ch_in[w.addr_sel][7:0]) + w.offset;
      cfg_sel = 1; cfg_to_ib = 1; cfg_data = 64'(w); exec_en = 0;
      @(negedge clk); cfg_sel = 0; exec_en = 1;
      @(posedge clk); #1;
      if (w.op == MOP_READ) chk(mem_out == {2'b00, shadow[a]}, $sformatf("array read %0d", a));
      else shadow[a] = ch_in[w.data_sel][23:0];
      exec_en = 0;
    end
    for (int i = 0; i < 256; i++) begin
      h_addr = 8'(i); #1 chk(h_rdata == shadow[i], $sformatf("host read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
