// spur_pkg: types and constants shared by the SPUR CPU data path.
//
// A register holds a 40-bit tagged word: an 8-bit tag (bits 39:32) above a
// 32-bit data word (bits 31:0). The register file has 138 physical rows
// organised as 10 global registers plus 8 overlapping windows of 16 rows each;
// a program sees 32 logical registers per window through 5-bit addresses
// (globals 0-9, "overlap with child" 10-15, locals 16-25, "overlap with
// parent" 26-31). These numbers follow the document. The operation encodings
// and the decoded-instruction struct are this design's own: the document
// refers to a separate instruction-set description for them.
package spur_pkg;

  localparam int WORD_W  = 40;  // tagged register width
  localparam int TAG_W   = 8;
  localparam int DATA_W  = 32;
  localparam int RADDR_W = 5;   // logical register address
  localparam int CWP_W   = 3;   // window pointer
  localparam int NWIN    = 8;
  localparam int NGLOBAL = 10;
  localparam int NLOCAL  = 10;
  localparam int NOVL    = 6;   // overlap registers shared by two windows
  localparam int NREGS   = NGLOBAL + NWIN * (NLOCAL + NOVL);  // 138
  localparam int PADDR_W = 8;   // physical row index, 0..137

  // Logical address ranges (5-bit register numbering)
  localparam logic [4:0] OWC_FIRST   = 5'b01010;  // 10: overlap with child
  localparam logic [4:0] LOCAL_FIRST = 5'b10000;  // 16
  localparam logic [4:0] OWP_FIRST   = 5'b11010;  // 26: overlap with parent

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [RADDR_W-1:0] raddr_t;
  typedef logic [CWP_W-1:0]   cwp_t;
  typedef logic [PADDR_W-1:0] paddr_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'd0,   // logical left by 1..3
    SH_SRL = 2'd1,   // logical right by 1
    SH_SRA = 2'd2    // arithmetic right by 1
  } shift_op_e;

  // Which functional unit discharges busD in phi4
  typedef enum logic [2:0] {
    FU_ALU   = 3'd0,
    FU_SHIFT = 3'd1,
    FU_BEXT  = 3'd2,
    FU_BINS  = 3'd3,
    FU_PSW   = 3'd4
  } fu_e;

  // Compare-and-branch conditions, evaluated on A - B
  typedef enum logic [3:0] {
    C_NEVER = 4'd0,
    C_EQ    = 4'd1,
    C_NE    = 4'd2,
    C_LT    = 4'd3,
    C_LE    = 4'd4,
    C_GT    = 4'd5,
    C_GE    = 4'd6,
    C_LTU   = 4'd7,
    C_LEU   = 4'd8,
    C_GTU   = 4'd9,
    C_GEU   = 4'd10,
    C_ALWAYS = 4'd11
  } cond_e;

  // One RD shift-register entry: where an instruction writes back
  typedef struct packed {
    logic   valid;
    raddr_t addr;
    cwp_t   cwp;
  } rd_entry_t;

  // Decoded instruction presented by the control unit during Ifetch
  typedef struct packed {
    raddr_t    rs1;
    raddr_t    rs2;
    raddr_t    rd;
    logic      rd_we;      // instruction writes RD
    logic      use_imm;    // BusBufB takes busI (immediate) instead of busB
    word_t     imm;
    fu_e       fu;
    alu_op_e   alu_op;
    shift_op_e shift_op;
    logic [1:0] shamt;     // left-shift amount 1..3
    logic [2:0] byte_sel;  // 0..3 data bytes, 4..7 the tag byte
    logic      is_load;
    logic      is_store;
    logic      psw_we;     // write busD into a PSW
    logic      psw_sel;    // 0 = UPSW, 1 = KPSW
    logic      if_enable;  // allow internal forwarding
    logic      is_branch;  // compare-and-branch: ALU subtracts, cond decides
    cond_e     cond;
  } ctrl_t;

endpackage
