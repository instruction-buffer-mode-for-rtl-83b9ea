// config_memory_tb: host writes, then reads with one cycle of latency,
// compared with a shadow copy.
module config_memory_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, h_we; logic [9:0] raddr, h_addr; cfg_word_t rdata, h_wdata;
  cfg_word_t shadow [1024];

  config_memory dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    re = 0; h_we = 0; raddr = 0; h_addr = 0; h_wdata = '0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); h_we = 1; h_addr = 10'(i); h_wdata = cfg_word_t'({$urandom, $urandom, $urandom});
      shadow[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk); re = 1; raddr = 10'($urandom);
      @(posedge clk); #1 chk(rdata == shadow[raddr], $sformatf("read %0d", raddr));
    end
    // a read is registered: rdata holds while re is low
    @(negedge clk); re = 1; raddr = 10'd5; @(negedge clk); re = 0; raddr = 10'd6;
    @(posedge clk); #1 chk(rdata == shadow[5], "rdata holds without re");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
