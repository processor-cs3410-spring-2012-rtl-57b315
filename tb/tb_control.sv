// tb_control: test of the decoder. Each supported instruction (with random
// register fields) is decoded and the fields that matter for it are
// compared with an expected control word written out per instruction;
// branches are checked for both comparator outcomes, and an unknown
// opcode must write nothing.
module tb_control;
  import mips_pkg::*;
  logic [31:0] inst;
  logic        eq, cmp_result;
  ctrl_t       ctrl;
  pc_sel_e     pc_sel;
  int checks = 0, failures = 0;

  control dut (.inst, .eq, .cmp_result, .ctrl, .pc_sel);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (inst %h): got %0d expected %0d", what, inst, got, exp);
    end
  endtask

  function automatic logic [31:0] rnd_fields(logic [5:0] op, logic [5:0] fn);
    logic [31:0] x = $urandom;
    x[31:26] = op;
    if (op == 6'h00) x[5:0] = fn;
    return x;
  endfunction

  // ALU-type instruction: we, destination, alu op, immediate source, extension
  task automatic alu_case(string nm, logic [5:0] op, logic [5:0] fn, alu_op_e aop,
                          logic imm, logic sgn, dst_sel_e dst, logic s16);
    inst = rnd_fields(op, fn); eq = 1'($urandom); cmp_result = 1'($urandom); #1;
    check({nm, " we"}, ctrl.reg_we, 1);
    check({nm, " dst"}, ctrl.dst_sel, dst);
    check({nm, " wb"}, ctrl.wb_sel, WB_ALU);
    check({nm, " aluop"}, ctrl.alu_op, aop);
    check({nm, " imm"}, ctrl.alu_src_imm, imm);
    if (imm) check({nm, " sign"}, ctrl.ext_sign, sgn);
    check({nm, " sh16"}, ctrl.shamt16, s16);
    check({nm, " mem_en"}, ctrl.mem_en, 0);
    check({nm, " pc"}, pc_sel, PC_SEQ);
  endtask

  task automatic load_case(string nm, logic [5:0] op, load_size_e sz, logic sg);
    inst = rnd_fields(op, 0); #1;
    check({nm, " we"}, ctrl.reg_we, 1);
    check({nm, " dst"}, ctrl.dst_sel, DST_RT);
    check({nm, " wb"}, ctrl.wb_sel, WB_MEM);
    check({nm, " aluop"}, ctrl.alu_op, ALU_ADD);
    check({nm, " imm"}, ctrl.alu_src_imm, 1);
    check({nm, " sign"}, ctrl.ext_sign, 1);
    check({nm, " mem_en"}, ctrl.mem_en, 1);
    check({nm, " mc"}, ctrl.mem_mc, MC_READ_WORD);
    check({nm, " size"}, ctrl.ld_size, sz);
    check({nm, " ldsign"}, ctrl.ld_signed, sg);
  endtask

  task automatic store_case(string nm, logic [5:0] op, mem_ctrl_e mc);
    inst = rnd_fields(op, 0); #1;
    check({nm, " we"}, ctrl.reg_we, 0);
    check({nm, " aluop"}, ctrl.alu_op, ALU_ADD);
    check({nm, " imm"}, ctrl.alu_src_imm, 1);
    check({nm, " sign"}, ctrl.ext_sign, 1);
    check({nm, " mem_en"}, ctrl.mem_en, 1);
    check({nm, " mc"}, ctrl.mem_mc, mc);
    check({nm, " pc"}, pc_sel, PC_SEQ);
  endtask

  // branch on eq: taken when eq == take_on
  task automatic eq_branch(string nm, logic [5:0] op, logic take_on);
    for (int v = 0; v < 2; v++) begin
      inst = rnd_fields(op, 0); eq = 1'(v); cmp_result = 1'($urandom); #1;
      check({nm, " we"}, ctrl.reg_we, 0);
      check({nm, " mem_en"}, ctrl.mem_en, 0);
      check({nm, " pc"}, pc_sel, (eq == take_on) ? PC_BRANCH : PC_SEQ);
    end
  endtask

  task automatic cmp_branch(string nm, logic [5:0] op, logic [4:0] rt, cmp_op_e cop);
    for (int v = 0; v < 2; v++) begin
      inst = rnd_fields(op, 0); inst[20:16] = rt; eq = 1'($urandom); cmp_result = 1'(v); #1;
      check({nm, " we"}, ctrl.reg_we, 0);
      check({nm, " cmp"}, ctrl.cmp_op, cop);
      check({nm, " pc"}, pc_sel, v ? PC_BRANCH : PC_SEQ);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      alu_case("ADDU", 0, 6'h21, ALU_ADD, 0, 0, DST_RD, 0);
      alu_case("ADD",  0, 6'h20, ALU_ADD, 0, 0, DST_RD, 0);
      alu_case("SUBU", 0, 6'h23, ALU_SUB, 0, 0, DST_RD, 0);
      alu_case("SUB",  0, 6'h22, ALU_SUB, 0, 0, DST_RD, 0);
      alu_case("OR",   0, 6'h25, ALU_OR,  0, 0, DST_RD, 0);
      alu_case("XOR",  0, 6'h26, ALU_XOR, 0, 0, DST_RD, 0);
      alu_case("NOR",  0, 6'h27, ALU_NOR, 0, 0, DST_RD, 0);
      alu_case("SLT",  0, 6'h2a, ALU_SLT, 0, 0, DST_RD, 0);
      alu_case("SLL",  0, 6'h00, ALU_SLL, 0, 0, DST_RD, 0);
      alu_case("SRL",  0, 6'h02, ALU_SRL, 0, 0, DST_RD, 0);
      alu_case("SRA",  0, 6'h03, ALU_SRA, 0, 0, DST_RD, 0);
      alu_case("ADDI", 6'h08, 0, ALU_ADD, 1, 1, DST_RT, 0);
      alu_case("ADDIU",6'h09, 0, ALU_ADD, 1, 1, DST_RT, 0);
      alu_case("SLTI", 6'h0a, 0, ALU_SLT, 1, 1, DST_RT, 0);
      alu_case("ANDI", 6'h0c, 0, ALU_AND, 1, 0, DST_RT, 0);
      alu_case("ORI",  6'h0d, 0, ALU_OR,  1, 0, DST_RT, 0);
      alu_case("LUI",  6'h0f, 0, ALU_SLL, 1, 0, DST_RT, 1);
      load_case("LB",  6'h20, LD_BYTE, 1);
      load_case("LBU", 6'h24, LD_BYTE, 0);
      load_case("LH",  6'h21, LD_HALF, 1);
      load_case("LHU", 6'h25, LD_HALF, 0);
      load_case("LW",  6'h23, LD_WORD, 0);
      store_case("SB", 6'h28, MC_WRITE_BYTE);
      store_case("SH", 6'h29, MC_WRITE_HALF);
      store_case("SW", 6'h2b, MC_WRITE_WORD);
      eq_branch("BEQ", 6'h04, 1);
      eq_branch("BNE", 6'h05, 0);
      cmp_branch("BLTZ", 6'h01, 5'h00, CMP_LTZ);
      cmp_branch("BGEZ", 6'h01, 5'h01, CMP_GEZ);
      cmp_branch("BLEZ", 6'h06, 5'h00, CMP_LEZ);
      cmp_branch("BGTZ", 6'h07, 5'h00, CMP_GTZ);
      // J
      inst = rnd_fields(6'h02, 0); #1;
      check("J we", ctrl.reg_we, 0); check("J pc", pc_sel, PC_JUMP);
      // JAL
      inst = rnd_fields(6'h03, 0); #1;
      check("JAL we", ctrl.reg_we, 1); check("JAL dst", ctrl.dst_sel, DST_RA);
      check("JAL wb", ctrl.wb_sel, WB_LINK); check("JAL pc", pc_sel, PC_JUMP);
      // JR
      inst = rnd_fields(6'h00, 6'h08); #1;
      check("JR we", ctrl.reg_we, 0); check("JR pc", pc_sel, PC_REG);
      // unknown opcode
      inst = rnd_fields(6'h3f, 0); #1;
      check("unknown we", ctrl.reg_we, 0); check("unknown mem", ctrl.mem_en, 0);
      check("unknown pc", pc_sel, PC_SEQ);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
