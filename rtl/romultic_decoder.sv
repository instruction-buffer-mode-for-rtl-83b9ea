// romultic_decoder: RoMultiC multicast target selection.
//
// A configuration word carries one row bit per array row and one column bit
// per array column instead of a serial element address. Every element of the
// addressed class whose row bit and column bit are both 1 takes the word, so
// one bus cycle can configure any rectangle-like set of elements (several
// rows and columns at once). Overlapping patterns are built by sending words
// in order: a later word overwrites an earlier one.
//
// The row and column vectors cover the SE grid (SE_ROWS x SE_COLS); PEs use
// the first ROWS x COLS of them, MULTs (one per PE row) only the row bits,
// MEMs (one per PE column) only the column bits, and the sequencer word
// neither. Purely combinational. The row/column rule is RoMultiC's; the
// element-class field is this design's choice.
module romultic_decoder
  import muccra_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned SR = R + 1,
  parameter int unsigned SC = C + 1
) (
  input  logic              valid,
  input  target_e           target,
  input  logic [SR-1:0]     row,
  input  logic [SC-1:0]     col,
  output logic [R*C-1:0]    pe_sel,
  output logic [SR*SC-1:0]  se_sel,
  output logic [R-1:0]      mult_sel,
  output logic [C-1:0]      mem_sel,
  output logic              stc_sel
);
  always_comb begin
    for (int r = 0; r < int'(R); r++)
      for (int c = 0; c < int'(C); c++)
        pe_sel[r*C+c] = valid && (target == TGT_PE) && row[r] && col[c];
    for (int r = 0; r < int'(SR); r++)
      for (int c = 0; c < int'(SC); c++)
        se_sel[r*SC+c] = valid && (target == TGT_SE) && row[r] && col[c];
    for (int r = 0; r < int'(R); r++)
      mult_sel[r] = valid && (target == TGT_MULT) && row[r];
    for (int c = 0; c < int'(C); c++)
      mem_sel[c] = valid && (target == TGT_MEM) && col[c];
    stc_sel = valid && (target == TGT_STC);
  end
endmodule
