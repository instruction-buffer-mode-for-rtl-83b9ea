// pe_rfile_tb: random writes and two-port reads against a shadow copy;
// checks reset clearing and that a write lands at the clock edge.
module pe_rfile_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we; logic [2:0] waddr, raddr_a, raddr_b; word_t wdata, rdata_a, rdata_b;
  word_t shadow [8];

  pe_rfile dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr_a = 0; raddr_b = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin shadow[i] = '0; raddr_a = 3'(i); #1 chk(rdata_a == '0, "reset"); end
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = 3'($urandom); wdata = 26'($urandom);
      raddr_a = 3'($urandom); raddr_b = 3'($urandom);
      #1 chk(rdata_a == shadow[raddr_a] && rdata_b == shadow[raddr_b], "read before edge");
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      chk(rdata_a == shadow[raddr_a] && rdata_b == shadow[raddr_b], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
