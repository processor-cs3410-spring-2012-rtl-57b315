// mips_pkg: types and constants shared by the single-cycle MIPS subset.
//
// Holds the instruction field layout (R-, I- and J-type), the opcode and
// function-code numbers of the supported instructions, the ALU operation
// and the control word that the decoder hands to the datapath.
//
// The opcode/function numbers of ADDU, SUBU, OR, XOR, NOR, SLL, SRL, SRA,
// JR, ADDIU, ANDI, ORI, LUI, the loads and stores, J, JAL and the branches
// follow the instruction tables of the design. SLT (function 0x2a) and ADDI
// (opcode 0x08) are taken from the machine-code example of the design.
// ADD (0x20), SUB (0x22) and SLTI (0x0a) are named by the design but their
// numbers are the standard MIPS ones, chosen here.
package mips_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_REGIMM = 6'h01,  // BLTZ / BGEZ, selected by the rt field
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_BLEZ  = 6'h06,
    OP_BGTZ  = 6'h07,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0a,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_LUI   = 6'h0f,
    OP_LB    = 6'h20,
    OP_LH    = 6'h21,
    OP_LW    = 6'h23,
    OP_LBU   = 6'h24,
    OP_LHU   = 6'h25,
    OP_SB    = 6'h28,
    OP_SH    = 6'h29,
    OP_SW    = 6'h2b
  } opcode_e;

  // ------------------------------------------------ R-type function codes
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_SRA  = 6'h03,
    FN_JR   = 6'h08,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2a
  } funct_e;

  // REGIMM sub-operations (rt field)
  localparam logic [4:0] SUB_BLTZ = 5'h00;
  localparam logic [4:0] SUB_BGEZ = 5'h01;

  // Link register written by JAL
  localparam logic [4:0] REG_RA = 5'd31;

  // ------------------------------------------------------ instruction view
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm;
  } itype_t;

  typedef struct packed {
    logic [5:0]  op;
    logic [25:0] target;
  } jtype_t;

  // -------------------------------------------------------------- ALU ops
  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOR,
    ALU_SLT,
    ALU_SLL,
    ALU_SRL,
    ALU_SRA
  } alu_op_e;

  // ----------------------------------------------------- memory control mc
  typedef enum logic [1:0] {
    MC_READ_WORD  = 2'b00,
    MC_WRITE_BYTE = 2'b01,
    MC_WRITE_HALF = 2'b10,
    MC_WRITE_WORD = 2'b11
  } mem_ctrl_e;

  // ----------------------------------------------------- load size/extend
  typedef enum logic [1:0] {
    LD_WORD = 2'b00,
    LD_HALF = 2'b01,
    LD_BYTE = 2'b10
  } load_size_e;

  // -------------------------------------------------- compare-with-zero op
  typedef enum logic [1:0] {
    CMP_LTZ = 2'b00,   // R[rs] <  0
    CMP_GEZ = 2'b01,   // R[rs] >= 0
    CMP_LEZ = 2'b10,   // R[rs] <= 0
    CMP_GTZ = 2'b11    // R[rs] >  0
  } cmp_op_e;

  // ------------------------------------------------------- next-PC choice
  typedef enum logic [1:0] {
    PC_SEQ    = 2'b00,  // PC+4
    PC_BRANCH = 2'b01,  // PC+4 + (offset << 2)
    PC_JUMP   = 2'b10,  // (PC+4)[31:28] || target || 00
    PC_REG    = 2'b11   // R[rs]
  } pc_sel_e;

  // ------------------------------------------------ register write source
  typedef enum logic [1:0] {
    WB_ALU  = 2'b00,
    WB_MEM  = 2'b01,
    WB_LINK = 2'b10    // PC+8
  } wb_sel_e;

  // ------------------------------------------- register write destination
  typedef enum logic [1:0] {
    DST_RD = 2'b00,
    DST_RT = 2'b01,
    DST_RA = 2'b10
  } dst_sel_e;

  // -------------------------------------------------------- control word
  typedef struct packed {
    logic       reg_we;     // register file WE
    dst_sel_e   dst_sel;    // R_W source
    wb_sel_e    wb_sel;     // W source
    logic       alu_src_imm;// ALU B input: 1 = extended immediate, 0 = B port
    logic       ext_sign;   // extend: 1 = sign, 0 = zero
    alu_op_e    alu_op;
    logic       shamt16;    // shift amount: 1 = constant 16 (LUI), 0 = shamt field
    logic       mem_en;     // data memory E
    mem_ctrl_e  mem_mc;     // data memory mc
    load_size_e ld_size;
    logic       ld_signed;
    cmp_op_e    cmp_op;
  } ctrl_t;

endpackage
