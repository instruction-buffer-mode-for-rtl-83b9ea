// instr_buffer_tb: checks the mode multiplexer (context memory word in
// multi-context mode, buffer in buffer mode), that an execution cycle in
// buffer mode empties the buffer (an unwritten buffer reads as all zero),
// and that a write in the execution cycle survives it.
module instr_buffer_tb;
  localparam int W = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, exec_en, exec_ib, ib_valid;
  logic [W-1:0] wdata, cm_rdata, cfg_out;

  instr_buffer #(.W(W)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] mbuf; logic mval;
  initial begin
    we = 0; exec_en = 0; exec_ib = 0; wdata = 0; cm_rdata = 64'h1234;
    repeat (2) @(posedge clk); rst_n = 1;
    mbuf = '0; mval = 0;
    #1 chk(cfg_out == 64'h1234, "multi-context mode passes the context memory word");
    exec_ib = 1; #1 chk(cfg_out == '0, "empty buffer reads as no-op");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0); wdata = {$urandom, $urandom};
      exec_en = ($urandom_range(0, 1) == 1); exec_ib = ($urandom_range(0, 3) != 0);
      cm_rdata = {$urandom, $urandom};
      #1 chk(cfg_out == (exec_ib ? (mval ? mbuf : '0) : cm_rdata), "output mux");
      @(posedge clk); #1;
      if (we) begin mbuf = wdata; mval = 1; end
      else if (exec_en && exec_ib) mval = 0;
      chk(ib_valid == mval, "valid bit");
    end
    // write during an execution cycle survives it
    @(negedge clk); we = 1; wdata = 64'hABCD; exec_en = 1; exec_ib = 1;
    @(negedge clk); we = 0; exec_en = 0;
    chk(cfg_out == 64'hABCD, "write in execution cycle kept");
    @(negedge clk); exec_en = 1;
    @(negedge clk); exec_en = 0;
    chk(cfg_out == '0, "buffer consumed by execution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
