// pe_smu_tb: random operands and shift amounts for every Shift & Mask Unit
// operation against a reference; carry bits must pass unchanged.
module pe_smu_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  smu_op_e op; logic [4:0] shamt; word_t x, y;

  pe_smu dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [23:0] model(smu_op_e o, int s, logic [23:0] d);
    logic [23:0] r = d;
    case (o)
      SMU_SHL: r = (s >= 24) ? 0 : d << s;
      SMU_SHR: r = (s >= 24) ? 0 : d >> s;
      SMU_SRA: for (int i = 0; i < 24; i++) r[i] = (i + s < 24) ? d[i + s] : d[23];
      SMU_MASK: for (int i = 0; i < 24; i++) r[i] = (i < s) ? d[i] : 1'b0;
      SMU_SEXT: if (s < 24) for (int i = 0; i < 24; i++) r[i] = (i < s) ? d[i] : d[s];
      default: ;
    endcase
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op = smu_op_e'($urandom_range(0, 5)); shamt = 5'($urandom); x = 26'($urandom);
      #1 chk(y == {x[25:24], model(op, shamt, x[23:0])}, $sformatf("op %0d s=%0d x=%h y=%h", op, shamt, x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
