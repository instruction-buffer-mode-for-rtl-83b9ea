// pe_core: the programmable core of one processing element.
//
// The connection block picks two operands, A and B, from the eight routing
// wires around the PE (two channels at each of the four surrounding switching
// elements), from the two register-file read ports, from a sign-extended
// 16-bit immediate, or zero. Operand B passes through the Shift & Mask Unit,
// then the ALU combines A and the shifted B. The ALU result is the PE's
// output wire to the switching elements, and can be written into the
// register file.
//
// Timing: everything from cb_in to pe_out is combinational within one
// execution cycle; the register-file write happens at the clock edge that
// ends a cycle with exec_en set. Switching elements register what they pick
// up, so a PE result is visible to other PEs in the next context.
//
// The SMU -> ALU -> RFile structure follows the MuCCRA-1 PE core; the operand
// sources, the SMU-before-ALU order and the context-word layout (pe_cfg_t)
// are this design's choices.
module pe_core
  import muccra_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pe_cfg_t cfg,
  input  logic    exec_en,
  input  word_t   cb_in [8],
  output word_t   pe_out
);
  word_t rf_a, rf_b, opa, opb, opb_s, imm_w;

  assign imm_w = {{CYW{1'b0}}, {(DW-16){cfg.imm[15]}}, cfg.imm};

  function automatic word_t pick(src_e s, word_t cb [8], word_t ra, word_t rb, word_t im);
    unique case (s)
      SRC_CB0, SRC_CB1, SRC_CB2, SRC_CB3,
      SRC_CB4, SRC_CB5, SRC_CB6, SRC_CB7: pick = cb[s[2:0]];
      SRC_RFA:  pick = ra;
      SRC_RFB:  pick = rb;
      SRC_IMM:  pick = im;
      default:  pick = '0;
    endcase
  endfunction

  always_comb begin
    opa = pick(cfg.src_a, cb_in, rf_a, rf_b, imm_w);
    opb = pick(cfg.src_b, cb_in, rf_a, rf_b, imm_w);
  end

  pe_smu u_smu (.op(cfg.smu_op), .shamt(cfg.shamt), .x(opb), .y(opb_s));
  pe_alu u_alu (.op(cfg.alu_op), .a(opa), .b(opb_s), .y(pe_out));

  pe_rfile u_rf (
    .clk, .rst_n,
    .we(exec_en && cfg.rf_we), .waddr(cfg.rf_wa), .wdata(pe_out),
    .raddr_a(cfg.rf_ra), .raddr_b(cfg.rf_rb), .rdata_a(rf_a), .rdata_b(rf_b)
  );
endmodule
