// mips_pkg: operation encodings, exception codes and pipeline-register types
// of the five-stage MIPS core. Exception codes and the coprocessor-0 register
// numbers are those of the MIPS32 architecture; the internal control encoding
// is this implementation's own.
package mips_pkg;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [1:0] {MD_MULT, MD_MULTU, MD_DIV, MD_DIVU} md_op_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_e;

  // MIPS32 exception codes (Cause.ExcCode).
  localparam logic [4:0] EXC_INT  = 5'd0;
  localparam logic [4:0] EXC_ADEL = 5'd4;
  localparam logic [4:0] EXC_ADES = 5'd5;
  localparam logic [4:0] EXC_IBE  = 5'd6;
  localparam logic [4:0] EXC_DBE  = 5'd7;
  localparam logic [4:0] EXC_SYS  = 5'd8;
  localparam logic [4:0] EXC_BP   = 5'd9;
  localparam logic [4:0] EXC_RI   = 5'd10;
  localparam logic [4:0] EXC_OV   = 5'd12;

  // Coprocessor-0 register numbers.
  localparam logic [4:0] CP0_BADVADDR = 5'd8;
  localparam logic [4:0] CP0_COUNT    = 5'd9;
  localparam logic [4:0] CP0_COMPARE  = 5'd11;
  localparam logic [4:0] CP0_STATUS   = 5'd12;
  localparam logic [4:0] CP0_CAUSE    = 5'd13;
  localparam logic [4:0] CP0_EPC      = 5'd14;
  localparam logic [4:0] CP0_PRID     = 5'd15;

  // Decoded control of one instruction.
  typedef struct packed {
    alu_op_e     alu_op;
    logic        b_imm;      // ALU b operand is the immediate
    logic        a_shamt;    // ALU a operand is the shift amount field
    logic [31:0] imm;
    logic        reg_write;
    logic [4:0]  dest;
    logic        mem_read;
    logic        mem_write;
    logic [1:0]  mem_size;   // 0 byte, 1 half, 2 word
    logic        mem_unsigned;
    br_e         br;
    logic        link;       // result is PC+8
    logic        md_start;
    md_op_e      md_op;
    logic        mfhi, mflo, mthi, mtlo;
    logic        mfc0, mtc0, eret;
    logic        trap_ovf;   // add/addi/sub raise overflow
    logic        use_rs, use_rt;
    logic        exc;
    logic [4:0]  exc_code;
  } ctrl_t;

endpackage
