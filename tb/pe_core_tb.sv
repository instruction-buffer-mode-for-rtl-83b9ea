// pe_core_tb: random context words (operand sources from the connection
// block, register file and immediate; SMU shift on operand B; ADD, SUB, XOR,
// PASSA) against a reference with its own register-file copy. Checks that
// the register file is written only in execution cycles.
module pe_core_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pe_cfg_t cfg; logic exec_en; word_t cb_in [8]; word_t pe_out;
  word_t rf [8];

  pe_core dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t src(src_e s, logic [2:0] ra, logic [2:0] rb, logic [15:0] imm);
    if (s <= SRC_CB7) return cb_in[s[2:0]];
    if (s == SRC_RFA) return rf[ra];
    if (s == SRC_RFB) return rf[rb];
    if (s == SRC_IMM) return {2'b00, {8{imm[15]}}, imm};
    return '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t a, b, e;
    logic [23:0] r;
    cfg = '0; exec_en = 0;
    for (int i = 0; i < 8; i++) begin cb_in[i] = '0; rf[i] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) cb_in[i] = 26'($urandom);
      cfg = '0;
      cfg.alu_op = alu_op_e'(($urandom_range(0, 3) == 0) ? ALU_ADD : ($urandom_range(0, 2) == 0) ? ALU_SUB :
                             ($urandom_range(0, 1) == 0) ? ALU_XOR : ALU_PASSA);
      cfg.smu_op = ($urandom_range(0, 1) == 1) ? SMU_SHL : SMU_PASS;
      cfg.shamt  = 5'($urandom_range(0, 7));
      cfg.src_a  = src_e'($urandom_range(0, 11));
      cfg.src_b  = src_e'($urandom_range(0, 11));
      cfg.rf_ra  = 3'($urandom); cfg.rf_rb = 3'($urandom);
      cfg.rf_we  = $urandom_range(0, 1) == 1; cfg.rf_wa = 3'($urandom);
      cfg.imm    = 16'($urandom);
      exec_en    = $urandom_range(0, 3) != 0;
      a = src(cfg.src_a, cfg.rf_ra, cfg.rf_rb, cfg.imm);
      b = src(cfg.src_b, cfg.rf_ra, cfg.rf_rb, cfg.imm);
      if (cfg.smu_op == SMU_SHL) b[23:0] = b[23:0] << cfg.shamt;
      case (cfg.alu_op)
        ALU_ADD: begin r = a[23:0] + b[23:0]; e = {(r == 0), ({1'b0, a[23:0]} + {1'b0, b[23:0]}) >> 24 != 0, r}; end
        ALU_SUB: begin r = a[23:0] - b[23:0]; e = {(r == 0), a[23:0] < b[23:0], r}; end
        ALU_XOR: begin r = a[23:0] ^ b[23:0]; e = {(r == 0), 1'b0, r}; end
        default: e = a;
      endcase
      #1 chk(pe_out == e, $sformatf("n=%0d op=%0d out=%h exp=%h", n, cfg.alu_op, pe_out, e));
      @(posedge clk);
      if (exec_en && cfg.rf_we) rf[cfg.rf_wa] = e;
    end
    // register file not written without an execution cycle
    @(negedge clk); cfg = '0; cfg.alu_op = ALU_PASSB; cfg.src_b = SRC_IMM; cfg.imm = 16'h0777;
    cfg.rf_we = 1; cfg.rf_wa = 3'd4; exec_en = 0;
    @(negedge clk); cfg = '0; cfg.alu_op = ALU_PASSA; cfg.src_a = SRC_RFA; cfg.rf_ra = 3'd4;
    #1 chk(pe_out == rf[4], "no write without exec_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
