// control: the decoder of the single-cycle CPU (the "control" ellipse of
// the datapath drawings).
//
// From the 32-bit instruction it produces the control word (register
// write enable and destination, write-back source, ALU operation and
// operand source, extension kind, shift-amount source, data-memory enable
// and mc code, load size) and the relation the zero comparator should
// test. It also receives the two comparator results (eq from "=?",
// cmp_result from "cmp") and from them picks the next-PC source, so a
// branch resolves in the same cycle. Combinational.
//
// Supported instructions: ADD, ADDU, SUB, SUBU, OR, XOR, NOR, SLT, SLL,
// SRL, SRA, JR, ADDI, ADDIU, SLTI, ANDI, ORI, LUI, LB, LBU, LH, LHU, LW,
// SB, SH, SW, J, JAL, BEQ, BNE, BLTZ, BGEZ, BLEZ, BGTZ. Any other
// encoding is executed as a no-operation (own choice: the design defines
// no exceptions). ADD, SUB and ADDI do not trap on overflow; they behave
// as ADDU, SUBU and ADDIU.
module control
  import mips_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        eq,          // R[rs] == R[rt]
  input  logic        cmp_result,  // result of the zero comparison
  output ctrl_t       ctrl,
  output pc_sel_e     pc_sel
);

  rtype_t r;
  assign r = rtype_t'(inst);

  // ------------------------------------------------ datapath control word
  always_comb begin
    ctrl = '{
      reg_we:      1'b0,
      dst_sel:     DST_RD,
      wb_sel:      WB_ALU,
      alu_src_imm: 1'b0,
      ext_sign:    1'b1,
      alu_op:      ALU_ADD,
      shamt16:     1'b0,
      mem_en:      1'b0,
      mem_mc:      MC_READ_WORD,
      ld_size:     LD_WORD,
      ld_signed:   1'b0,
      cmp_op:      CMP_LTZ
    };
    unique case (r.op)
      OP_RTYPE: begin
        ctrl.dst_sel = DST_RD;
        ctrl.reg_we  = 1'b1;
        unique case (r.funct)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_OR:           ctrl.alu_op = ALU_OR;
          FN_XOR:          ctrl.alu_op = ALU_XOR;
          FN_NOR:          ctrl.alu_op = ALU_NOR;
          FN_SLT:          ctrl.alu_op = ALU_SLT;
          FN_SLL:          ctrl.alu_op = ALU_SLL;
          FN_SRL:          ctrl.alu_op = ALU_SRL;
          FN_SRA:          ctrl.alu_op = ALU_SRA;
          default:         ctrl.reg_we = 1'b0;   // JR and unknown
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_ANDI, OP_ORI, OP_LUI: begin
        ctrl.reg_we      = 1'b1;
        ctrl.dst_sel     = DST_RT;
        ctrl.alu_src_imm = 1'b1;
        unique case (r.op)
          OP_SLTI: ctrl.alu_op = ALU_SLT;
          OP_ANDI: begin ctrl.alu_op = ALU_AND; ctrl.ext_sign = 1'b0; end
          OP_ORI:  begin ctrl.alu_op = ALU_OR;  ctrl.ext_sign = 1'b0; end
          OP_LUI:  begin
            ctrl.alu_op   = ALU_SLL;
            ctrl.ext_sign = 1'b0;
            ctrl.shamt16  = 1'b1;
          end
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.reg_we      = 1'b1;
        ctrl.dst_sel     = DST_RT;
        ctrl.wb_sel      = WB_MEM;
        ctrl.alu_src_imm = 1'b1;
        ctrl.mem_en      = 1'b1;
        ctrl.mem_mc      = MC_READ_WORD;
        ctrl.ld_signed   = (r.op == OP_LB || r.op == OP_LH);
        ctrl.ld_size     = (r.op == OP_LB || r.op == OP_LBU) ? LD_BYTE :
                           (r.op == OP_LH || r.op == OP_LHU) ? LD_HALF : LD_WORD;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.alu_src_imm = 1'b1;
        ctrl.mem_en      = 1'b1;
        ctrl.mem_mc      = (r.op == OP_SB) ? MC_WRITE_BYTE :
                           (r.op == OP_SH) ? MC_WRITE_HALF : MC_WRITE_WORD;
      end
      OP_JAL: begin
        ctrl.reg_we  = 1'b1;
        ctrl.dst_sel = DST_RA;
        ctrl.wb_sel  = WB_LINK;
      end
      OP_REGIMM: ctrl.cmp_op = (r.rt == SUB_BGEZ) ? CMP_GEZ : CMP_LTZ;
      OP_BLEZ:   ctrl.cmp_op = CMP_LEZ;
      OP_BGTZ:   ctrl.cmp_op = CMP_GTZ;
      default: ;  // J, BEQ, BNE and unknown opcodes write nothing
    endcase
  end

  // ----------------------------------------------------------- next PC
  always_comb begin
    pc_sel = PC_SEQ;
    unique case (r.op)
      OP_RTYPE:          if (r.funct == FN_JR) pc_sel = PC_REG;
      OP_J, OP_JAL:      pc_sel = PC_JUMP;
      OP_BEQ:            if (eq)  pc_sel = PC_BRANCH;
      OP_BNE:            if (!eq) pc_sel = PC_BRANCH;
      OP_REGIMM: if ((r.rt == SUB_BLTZ || r.rt == SUB_BGEZ) && cmp_result)
                   pc_sel = PC_BRANCH;
      OP_BLEZ, OP_BGTZ:  if (cmp_result) pc_sel = PC_BRANCH;
      default: ;
    endcase
  end

endmodule
