// pe_smu: Shift & Mask Unit, the data manipulator of the PE core.
//
// Shifts or masks the 24-bit data part of its operand by a constant amount
// taken from the context word: logical left, logical right, arithmetic
// right, keep the low `shamt` bits (mask), or sign-extend from bit `shamt`.
// The 2-bit carry field passes through unchanged. Purely combinational.
// The unit's role follows the MuCCRA-1 PE core; its operation set is this
// design's choice.
module pe_smu
  import muccra_pkg::*;
(
  input  smu_op_e    op,
  input  logic [4:0] shamt,
  input  word_t      x,
  output word_t      y
);
  logic [DW-1:0] d, r, m;

  always_comb begin
    d = x[DW-1:0];
    m = (shamt >= 5'd24) ? '1 : ((DW'(1) << shamt) - DW'(1));
    unique case (op)
      SMU_SHL:  r = d << shamt;
      SMU_SHR:  r = d >> shamt;
      SMU_SRA:  r = DW'($signed(d) >>> shamt);
      SMU_MASK: r = d & m;
      SMU_SEXT: r = (shamt < 5'd24 && d[shamt]) ? (d | ~m) : (d & m);
      default:  r = d;
    endcase
    y = {x[WW-1:DW], r};
  end
endmodule
