// romultic_decoder_tb: random row/column multicast patterns and element
// classes; every select output is compared with the row-AND-column rule.
module romultic_decoder_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  logic valid; target_e target; logic [4:0] row, col;
  logic [15:0] pe_sel; logic [24:0] se_sel; logic [3:0] mult_sel, mem_sel; logic stc_sel;

  romultic_decoder dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int npe;
    for (int n = 0; n < 400; n++) begin
      valid = ($urandom_range(0, 7) != 0); target = target_e'($urandom_range(0, 5));
      row = 5'($urandom); col = 5'($urandom);
      #1;
      npe = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        chk(pe_sel[r*4+c] == (valid && target == TGT_PE && row[r] && col[c]), "pe select");
        npe += (valid && target == TGT_PE && row[r] && col[c]) ? 1 : 0;
      end
      chk($countones(pe_sel) == npe, "pe select count");
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++)
        chk(se_sel[r*5+c] == (valid && target == TGT_SE && row[r] && col[c]), "se select");
      for (int r = 0; r < 4; r++) chk(mult_sel[r] == (valid && target == TGT_MULT && row[r]), "mult select");
      for (int c = 0; c < 4; c++) chk(mem_sel[c] == (valid && target == TGT_MEM && col[c]), "mem select");
      chk(stc_sel == (valid && target == TGT_STC), "stc select");
    end
    // full-array multicast: one word, sixteen PEs
    valid = 1; target = TGT_PE; row = 5'b01111; col = 5'b01111; #1;
    chk(pe_sel == 16'hFFFF, "broadcast to all PEs");
    row = 5'b00010; col = 5'b00110; #1;
    chk(pe_sel == 16'h0060, "row 1, columns 1-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
