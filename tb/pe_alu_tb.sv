// pe_alu_tb: random operands for every ALU operation, compared with a
// reference computed here (24-bit data, {flag, carry} in bits 25:24).
module pe_alu_tb;
  import muccra_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op; word_t a, b, y;

  pe_alu dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    longint xa = x[23:0], zb = z[23:0], s;
    longint sx = x[23] ? xa - (1 << 24) : xa, sz = z[23] ? zb - (1 << 24) : zb;
    logic [23:0] r; logic c, f;
    r = 0; c = 0; f = 0;
    case (o)
      ALU_ADD:  begin s = xa + zb; r = s[23:0]; c = s[24]; f = (r == 0); end
      ALU_ADDC: begin s = xa + zb + z[24]; r = s[23:0]; c = s[24]; f = (r == 0); end
      ALU_SUB:  begin s = xa - zb; r = s[23:0]; c = xa < zb; f = (r == 0); end
      ALU_AND:  begin r = x[23:0] & z[23:0]; f = (r == 0); end
      ALU_OR:   begin r = x[23:0] | z[23:0]; f = (r == 0); end
      ALU_XOR:  begin r = x[23:0] ^ z[23:0]; f = (r == 0); end
      ALU_PASSA: return x;
      ALU_PASSB: return z;
      ALU_SLT:  begin r = (sx < sz) ? 1 : 0; f = sx < sz; end
      ALU_MIN:  begin r = (sx < sz) ? x[23:0] : z[23:0]; f = sx < sz; end
      ALU_MAX:  begin r = (sx < sz) ? z[23:0] : x[23:0]; f = sx < sz; end
      ALU_EQ:   begin r = (xa == zb) ? 1 : 0; f = xa == zb; end
      default:  ;
    endcase
    return {f, c, r};
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op = alu_op_e'($urandom_range(0, 12));
      a = 26'($urandom); b = 26'($urandom);
      if (n % 10 == 0) b = a;
      #1 chk(y == model(op, a, b), $sformatf("op %0d a=%h b=%h y=%h", op, a, b, y));
    end
    op = ALU_ADD; a = 26'hFFFFFF; b = 26'h1; #1 chk(y == {2'b11, 24'h0}, "add wraps with carry and zero flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
