// context_memory_tb: random writes and reads of the context memory against a
// shadow array; checks that reset clears every slot and that the read port
// follows the pointer without latency.
module context_memory_tb;
  localparam int W = 64, DEPTH = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we; logic [5:0] waddr, raddr; logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [DEPTH];

  context_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 6'(i); #1; chk(rdata == '0, $sformatf("slot %0d not cleared", i)); shadow[i] = '0;
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = 6'($urandom); wdata = {$urandom, $urandom};
      raddr = 6'($urandom);
      #1 chk(rdata == shadow[raddr], $sformatf("read slot %0d", raddr));
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      chk(rdata == shadow[raddr], $sformatf("read after write slot %0d", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
