// pe_alu: arithmetic logic unit of the PE core.
//
// Works on 24-bit data words that travel with a 2-bit carry field,
// {flag, carry}. Add and subtract produce the arithmetic carry (borrow for
// subtract) in bit 24; bit 25 is a condition flag: "result is zero" for
// arithmetic and logic operations, and the comparison outcome for SLT, MIN,
// MAX and EQ. ADDC adds the carry bit that arrives with operand B, so wider
// additions can be chained across PEs. PASSA/PASSB forward an operand with
// its carry field. NOP gives zero.
//
// Purely combinational. The 24-bit width and the 2-bit carry follow the
// MuCCRA-1 data path; the operation set and the meaning of the two carry bits
// are this design's choice.
module pe_alu
  import muccra_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  logic [DW-1:0] ad, bd, r;
  logic          cy, fl;
  logic          lt;

  always_comb begin
    ad = a[DW-1:0];
    bd = b[DW-1:0];
    lt = $signed(ad) < $signed(bd);
    r  = '0;
    cy = 1'b0;
    fl = 1'b0;
    unique case (op)
      ALU_ADD:   begin {cy, r} = {1'b0, ad} + {1'b0, bd};         fl = (r == '0); end
      ALU_ADDC:  begin {cy, r} = {1'b0, ad} + {1'b0, bd} + {{DW{1'b0}}, b[DW]}; fl = (r == '0); end
      ALU_SUB:   begin r = ad - bd; cy = (ad < bd);                fl = (r == '0); end
      ALU_AND:   begin r = ad & bd;                                fl = (r == '0); end
      ALU_OR:    begin r = ad | bd;                                fl = (r == '0); end
      ALU_XOR:   begin r = ad ^ bd;                                fl = (r == '0); end
      ALU_PASSA: begin r = ad; {fl, cy} = a[WW-1:DW]; end
      ALU_PASSB: begin r = bd; {fl, cy} = b[WW-1:DW]; end
      ALU_SLT:   begin r = {{(DW-1){1'b0}}, lt}; fl = lt; end
      ALU_MIN:   begin r = lt ? ad : bd; fl = lt; end
      ALU_MAX:   begin r = lt ? bd : ad; fl = lt; end
      ALU_EQ:    begin r = {{(DW-1){1'b0}}, ad == bd}; fl = (ad == bd); end
      default:   ;
    endcase
    y = {fl, cy, r};
  end
endmodule
