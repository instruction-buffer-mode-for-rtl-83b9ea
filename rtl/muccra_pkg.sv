// muccra_pkg: sizes, configuration-word formats and shared types of the
// multi-context reconfigurable array with instruction buffer mode.
//
// The array follows the MuCCRA-1 organisation: a 4x4 array of 24-bit
// processing elements (PEs) in an island-style routing fabric with a
// switching element (SE) at every channel intersection (5x5), one multiplier
// (MULT) on the left of every row and one 24-bit x 256 memory (MEM) below
// every column. Every element holds a 64-entry context memory and a one-entry
// instruction buffer. Data words carry 24 data bits plus a 2-bit carry.
//
// The numbers 4x4, 24-bit data, 2-bit carry, 8-entry register file,
// 64-bit x 64-entry PE context memory, two routing channels, four MULTs and
// four 24-bit x 256 MEMs follow the MuCCRA-1 description. Every bit-level
// encoding below (opcodes, field positions, the configuration-bus word, the
// task descriptor) is this design's own choice.
package muccra_pkg;

  // ---------------- array geometry and data path ----------------
  localparam int unsigned DW        = 24;          // data bits
  localparam int unsigned CYW       = 2;           // carry bits
  localparam int unsigned WW        = DW + CYW;    // word on a routing wire
  localparam int unsigned ROWS      = 4;           // PE rows
  localparam int unsigned COLS      = 4;           // PE columns
  localparam int unsigned SE_ROWS   = ROWS + 1;    // SE grid rows
  localparam int unsigned SE_COLS   = COLS + 1;    // SE grid columns
  localparam int unsigned NCH       = 2;           // routing channels
  localparam int unsigned RF_DEPTH  = 8;           // PE register file entries
  localparam int unsigned MEM_DEPTH = 256;         // MEM entries
  localparam int unsigned MEM_AW    = 8;

  // ---------------- contexts and configuration ----------------
  localparam int unsigned CTX_DEPTH = 64;          // hardware contexts
  localparam int unsigned CTX_AW    = 6;
  localparam int unsigned CFG_DW    = 64;          // configuration data bus width
  localparam int unsigned PE_CFG_W  = 64;          // PE context word
  localparam int unsigned SE_CFG_W  = 10;          // SE context word
  localparam int unsigned MUL_CFG_W = 24;          // MULT context word
  localparam int unsigned MEM_CFG_W = 24;          // MEM context word
  localparam int unsigned STC_CFG_W = 10;          // state-transition word

  localparam int unsigned CM_DEPTH  = 1024;        // central configuration memory words
  localparam int unsigned CM_AW     = 10;
  localparam int unsigned NTASK     = 16;          // task table entries
  localparam int unsigned TASK_AW   = 4;

  typedef logic [WW-1:0] word_t;                   // {carry[1:0], data[23:0]}

  // Element class addressed by a configuration word.
  typedef enum logic [2:0] {
    TGT_NONE = 3'd0,
    TGT_PE   = 3'd1,
    TGT_SE   = 3'd2,
    TGT_MULT = 3'd3,
    TGT_MEM  = 3'd4,
    TGT_STC  = 3'd5
  } target_e;

  // One word of the central configuration memory / configuration bus.
  // RoMultiC addressing: an element at (r,c) of the selected class takes the
  // word when row[r] and col[c] are both 1 (MULTs use row only, MEMs col only).
  typedef struct packed {
    target_e              target;
    logic [SE_ROWS-1:0]   row;
    logic [SE_COLS-1:0]   col;
    logic [CTX_AW-1:0]    ctx;     // context slot (multi-context mode)
    logic [CFG_DW-1:0]    data;
  } cfg_word_t;

  // ---------------- PE configuration ----------------
  typedef enum logic [3:0] {
    ALU_NOP  = 4'd0,
    ALU_ADD  = 4'd1,
    ALU_ADDC = 4'd2,
    ALU_SUB  = 4'd3,
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_PASSA= 4'd7,
    ALU_PASSB= 4'd8,
    ALU_SLT  = 4'd9,
    ALU_MIN  = 4'd10,
    ALU_MAX  = 4'd11,
    ALU_EQ   = 4'd12
  } alu_op_e;

  typedef enum logic [2:0] {
    SMU_PASS = 3'd0,
    SMU_SHL  = 3'd1,
    SMU_SHR  = 3'd2,
    SMU_SRA  = 3'd3,
    SMU_MASK = 3'd4,   // keep the low shamt bits
    SMU_SEXT = 3'd5    // sign-extend from bit shamt
  } smu_op_e;

  // Operand sources: 0..7 connection-block inputs, then local sources.
  typedef enum logic [3:0] {
    SRC_CB0 = 4'd0, SRC_CB1 = 4'd1, SRC_CB2 = 4'd2, SRC_CB3 = 4'd3,
    SRC_CB4 = 4'd4, SRC_CB5 = 4'd5, SRC_CB6 = 4'd6, SRC_CB7 = 4'd7,
    SRC_RFA = 4'd8, SRC_RFB = 4'd9, SRC_IMM = 4'd10, SRC_ZERO = 4'd11
  } src_e;

  typedef struct packed {
    logic [17:0]  rsvd;
    logic [15:0]  imm;      // sign-extended immediate
    logic [2:0]   rf_wa;
    logic         rf_we;
    logic [2:0]   rf_rb;
    logic [2:0]   rf_ra;
    src_e         src_b;
    src_e         src_a;
    logic [4:0]   shamt;
    smu_op_e      smu_op;
    alu_op_e      alu_op;
  } pe_cfg_t;

  // ---------------- SE configuration ----------------
  // Per switch: 0 hold, 1..8 neighbour SE channels N0,N1,S0,S1,E0,E1,W0,W1,
  // 9..12 PEs NW,NE,SW,SE, 13..14 MULT above/below (left edge),
  // 15..16 MEM left/right (bottom edge), 17 clear.
  localparam int unsigned SE_SRC_N   = 18;
  localparam logic [4:0] SW_HOLD  = 5'd0;
  localparam logic [4:0] SW_NBR0  = 5'd1;
  localparam logic [4:0] SW_PE0   = 5'd9;
  localparam logic [4:0] SW_SIDE0 = 5'd13;
  localparam logic [4:0] SW_CLEAR = 5'd17;

  typedef struct packed {
    logic [4:0] sel1;
    logic [4:0] sel0;
  } se_cfg_t;

  // ---------------- MULT configuration ----------------
  typedef enum logic [1:0] {
    MUL_NOP = 2'd0,
    MUL_LO  = 2'd1,   // low 24 bits of the signed product
    MUL_HI  = 2'd2    // high 24 bits of the signed 48-bit product
  } mul_op_e;

  typedef struct packed {
    logic [15:0] imm;
    logic [2:0]  sel_b;    // 0..3 channel, 4 immediate
    logic [2:0]  sel_a;    // 0..3 channel
    mul_op_e     op;
  } mul_cfg_t;

  // ---------------- MEM configuration ----------------
  typedef enum logic [1:0] {
    MOP_NOP   = 2'd0,
    MOP_READ  = 2'd1,
    MOP_WRITE = 2'd2
  } mem_op_e;

  typedef struct packed {
    logic [9:0]  rsvd;
    logic [7:0]  offset;   // added to the address source
    logic [1:0]  data_sel; // 0..3 channel
    logic [1:0]  addr_sel; // 0..2 channel, 3 zero
    mem_op_e     op;
  } mem_cfg_t;

  // ---------------- state transition (context sequencing) ----------------
  typedef struct packed {
    logic              last;      // final context of the task
    logic              loop_en;   // end of an inter-context loop body
    logic              loop_id;   // which of the two loop counters
    logic [CTX_AW-1:0] target;    // first context of the loop body
    logic              rsvd;
  } stc_cfg_t;

  // ---------------- task descriptor ----------------
  typedef struct packed {
    logic              mode;      // mode flag: 0 multi-context, 1 instruction buffer
    logic [CM_AW-1:0]  cfg_base;  // first configuration word
    logic [CM_AW:0]    cfg_len;   // number of configuration words (Conf_task)
    logic [CTX_AW-1:0] ctx_base;  // first context slot
    logic [CTX_AW:0]   ctx_count; // context slots used (Context_task)
    logic [7:0]        iter0;     // iterations of loop 0
    logic [7:0]        iter1;     // iterations of loop 1
  } task_t;

endpackage
