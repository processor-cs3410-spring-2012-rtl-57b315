// tb_mips_top: end-to-end test of the whole computer at its default sizes.
//
// A program is assembled in the testbench, written into the program memory
// through the load port while reset is held, and run to a halt (a jump to
// itself). The program strings together the worked examples of the
// design: r4 = (r1 + r2) | r3, r8 = 4*r3 + r4 - 1, r9 = 9, building
// 0xdeadbeef and 0xBABACCD0 with LUI/ORI, r5 = r3 * 8 by a shift, the counting loop of 10 iterations (SLT, BEQ,
// J), the store/load byte layout example, an array update
// A[12] = h + A[8] (an extra example), the if/else example in both
// directions, jumps to 0xabcd1234 and 0xdecafe00 chosen by r3, a JAL/JR
// subroutine call, all compare-with-zero branches taken and not taken,
// halfword/byte stores and signed/unsigned loads, and a write to r0.
//
// Every cycle the testbench steps an instruction-level reference model
// (mips_iss) and compares the PC, the instruction, the register write
// (register and value) and the store (address, size, data). At the end it
// compares all 32 registers and the data memory bytes the program wrote,
// checks hand-computed results of the examples, checks that each
// instruction took exactly one clock cycle, and requires that every
// mechanism listed in the mechanism table occurred at least once.
module tb_mips_top;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam int          MEM_BITS = 16;       // default size of mips_top
  localparam logic [31:0] HALT_PC  = 32'h0000_0ff0;

  logic        clk = 1'b0, rst;
  logic        prog_we;
  logic [31:0] prog_addr, prog_wdata;
  logic [31:0] pc, inst, rf_wdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        rf_we, dmem_en;
  logic [4:0]  rf_waddr;
  logic [1:0]  dmem_mc;

  mips_top dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_wdata,
    .pc, .inst, .rf_we, .rf_waddr, .rf_wdata,
    .dmem_en, .dmem_mc, .dmem_addr, .dmem_wdata, .dmem_rdata
  );

  always #5 clk = ~clk;

  // clock cycles from reset release until the PC reaches the halt loop
  int run_cycles = 0;
  always @(negedge clk) if (!rst && pc != HALT_PC) run_cycles++;

  int checks = 0, failures = 0;
  logic [31:0] prog [logic [31:0]];   // byte address -> instruction
  logic [31:0] at;                    // assembly pointer
  mips_iss     iss;

  // mechanism counters
  typedef enum int {
    M_RTYPE_ALU, M_SHIFT, M_IMM_ALU, M_LUI, M_SLT, M_LOAD_WORD, M_LOAD_SUB,
    M_STORE_WORD, M_STORE_HALF, M_STORE_BYTE, M_BR_TAKEN, M_BR_NOT_TAKEN,
    M_CMP_BRANCH, M_JUMP, M_JAL_LINK, M_JR, M_R0_WRITE, M_REGION_JUMP, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{
    "R-type ALU op", "shift", "immediate ALU op", "LUI (shift by 16)", "set-less-than",
    "load word", "load byte/halfword", "store word", "store halfword", "store byte",
    "branch taken", "branch not taken", "compare-with-zero branch", "jump (J)",
    "jump and link", "jump register", "write to r0 dropped", "jump outside low 64 KiB"
  };

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h (pc %h)", what, got, exp, pc);
    end
  endtask

  logic [31:0] exp_wr [logic [31:0]]; // hand-worked result of the write at a PC
  int          exp_hits = 0;

  function automatic void emit(logic [31:0] w);
    prog[at] = w;
    at += 4;
  endfunction

  // expect the instruction just emitted to write this value
  function automatic void expect_wr(logic [31:0] v);
    exp_wr[at - 4] = v;
  endfunction

  // ------------------------------------------------------------ program
  function automatic void build_program();
    logic [31:0] loop_pc;
    at = 0;
    // r4 = (r1 + r2) | r3 ; r8 = 4*r3 + r4 - 1 ; r9 = 9
    emit(i_addiu(1, 0, 5));
    emit(i_addiu(2, 0, 7));
    emit(i_addiu(3, 0, 32'h30));
    emit(i_addu(4, 1, 2));
    emit(i_or(4, 4, 3));             expect_wr(32'd60);    // (5+7)|48
    emit(i_sll(8, 3, 2));
    emit(i_addu(8, 8, 4));
    emit(i_addiu(8, 8, -1));         expect_wr(32'd251);   // 4*48+60-1
    emit(i_addiu(9, 0, 9));          expect_wr(32'd9);
    // r5 = 0xdeadbeef, r2 = -1, r9b = 65535, LUI/ORI
    emit(i_lui(10, 16'hdead));
    emit(i_ori(10, 10, 16'hbeef));   expect_wr(32'hdeadbeef);
    emit(i_addiu(11, 0, -1));        expect_wr(32'hffffffff);
    emit(i_ori(12, 0, 16'hffff));    expect_wr(32'h0000ffff);
    emit(i_andi(13, 10, 16'hff0f));  expect_wr(32'h0000be0f);
    // R-type variety
    emit(i_subu(14, 1, 2));          expect_wr(32'hfffffffe);
    emit(i_xor(15, 10, 11));         expect_wr(32'h21524110);
    emit(i_nor(16, 1, 2));           expect_wr(32'hfffffff8);
    emit(i_sra(17, 10, 4));          expect_wr(32'hfdeadbee);
    emit(i_srl(18, 10, 4));          expect_wr(32'h0deadbee);
    emit(i_add(19, 10, 1));          expect_wr(32'hdeadbef4);
    emit(i_sub(20, 10, 1));          expect_wr(32'hdeadbeea);
    emit(i_slti(21, 14, 4));         expect_wr(32'd1);     // -2 < 4
    emit(i_slti(22, 9, 4));          expect_wr(32'd0);     // 9 < 4
    emit(i_slt(23, 10, 1));          expect_wr(32'd1);     // negative < 5
    // r5 = r3 * 8 by a shift, r5 += 5, r2 = 0xBABACCD0 with LUI/ORI
    emit(i_sll(5, 3, 3));            expect_wr(32'd384);   // 48 * 8
    emit(i_addiu(5, 5, 5));          expect_wr(32'd389);
    emit(i_lui(2, 16'hbaba));
    emit(i_ori(2, 2, 16'hccd0));     expect_wr(32'hbabaccd0);
    emit(i_addiu(0, 0, 123));        // write to r0 is dropped
    // for (i = 0; i < 10; i++) count++
    emit(i_addi(2, 0, 10));
    emit(i_addi(1, 0, 0));
    emit(i_addiu(24, 0, 0));
    loop_pc = at;
    emit(i_slt(3, 1, 2));
    emit(i_beq(3, 0, 3));
    emit(i_addiu(1, 1, 1));
    emit(i_addiu(24, 24, 1));
    emit(i_j(loop_pc));
    // memory layout example
    emit(i_addiu(5, 0, 5));
    emit(i_sb(5, 2, 0));
    emit(i_lb(6, 2, 0));             expect_wr(32'd5);
    emit(i_sw(5, 8, 0));
    emit(i_lb(7, 8, 0));             expect_wr(32'd5);
    emit(i_lb(8, 11, 0));            expect_wr(32'd0);
    // A[12] = h + A[8]   (A at 0x100 in r3, h = 34 in r2)
    emit(i_addiu(3, 0, 32'h100));
    emit(i_addiu(2, 0, 34));
    emit(i_addiu(25, 0, 1000));
    emit(i_sw(25, 32, 3));           // A[8] = 1000
    emit(i_lw(4, 32, 3));
    emit(i_addu(5, 4, 2));
    emit(i_sw(5, 48, 3));
    emit(i_lw(26, 48, 3));           expect_wr(32'd1034);  // read back A[12]
    // halfword and byte stores, signed and unsigned loads
    emit(i_sw(10, 32'h200, 0));      // 0xdeadbeef at 0x200
    emit(i_sh(11, 32'h206, 0));      // 0xffff at 0x206
    emit(i_sh(12, 32'h204, 0));      // 0xffff at 0x204
    emit(i_sb(9, 32'h205, 0));       // 0x09 at 0x205
    emit(i_lh(27, 32'h202, 0));      expect_wr(32'hffffdead);
    emit(i_lhu(28, 32'h202, 0));     expect_wr(32'h0000dead);
    emit(i_lb(29, 32'h203, 0));      expect_wr(32'hffffffde);
    emit(i_lbu(30, 32'h200, 0));     expect_wr(32'h000000ef);
    emit(i_lw(31, 32'h204, 0));      expect_wr(32'hffff09ff);
    // if (i == j) i = i * 4; else j = i - j;   first with i != j
    emit(i_addiu(1, 0, 6));
    emit(i_addiu(2, 0, 2));
    emit(i_beq(1, 2, 2));
    emit(i_subu(2, 1, 2));           expect_wr(32'd4);     // else: j = i - j
    emit(i_j(at + 8));
    emit(i_sll(1, 1, 2));            // then
    //   then with i == j (use bne for the other form)
    emit(i_addiu(13, 0, 3));
    emit(i_addiu(14, 0, 3));
    emit(i_bne(13, 14, 2));
    emit(i_sll(13, 13, 2));          expect_wr(32'd12);    // then: i = i * 4
    emit(i_j(at + 8));
    emit(i_subu(14, 13, 14));        // else (skipped)
    // compare-with-zero branches, each taken once and not taken once
    emit(i_addiu(15, 0, -3));
    emit(i_addiu(16, 0, 0));
    emit(i_addiu(17, 0, 0));
    emit(i_bltz(15, 1));  emit(i_addiu(17, 17, 1));      // taken: skip
    emit(i_bltz(16, 1));  emit(i_addiu(17, 17, 2));      // not taken
    emit(i_bgez(16, 1));  emit(i_addiu(17, 17, 4));      // taken
    emit(i_bgez(15, 1));  emit(i_addiu(17, 17, 8));      // not taken
    emit(i_blez(16, 1));  emit(i_addiu(17, 17, 16));     // taken
    emit(i_blez(1, 1));   emit(i_addiu(17, 17, 32));     // not taken
    emit(i_bgtz(1, 1));   emit(i_addiu(17, 17, 64));     // taken
    emit(i_bgtz(15, 1));  emit(i_addiu(17, 17, 128));    // not taken
    // subroutine call: jal sub ; the next word is not executed on return
    emit(i_addiu(18, 0, 0));
    emit(i_jal(32'h0000_0800));
    emit(i_addiu(18, 18, 100));      // link is PC+8: skipped
    emit(i_addiu(18, 18, 1));        // return lands here
    // jump to 0xabcd1234 if r3 != 0, else to 0xdecafe00 (r3 = 0 here)
    emit(i_addiu(3, 0, 0));
    emit(i_beq(3, 0, 3));
    emit(i_lui(6, 16'habcd));
    emit(i_ori(6, 6, 16'h1234));
    emit(i_jr(6));
    emit(i_lui(6, 16'hdeca));
    emit(i_ori(6, 6, 16'hfe00));
    emit(i_jr(6));
    // subroutine
    at = 32'h0000_0800;
    emit(i_addiu(19, 0, 77));
    emit(i_jr(31));
    // code reached at 0xdecafe00 (memory offset 0xfe00): then go to 0xabcd1234
    at = 32'h0000_fe00;
    emit(i_addiu(20, 0, 32'h5a));
    emit(i_addiu(3, 0, 1));
    emit(i_beq(3, 0, 3));            // r3 = 1: not taken
    emit(i_lui(6, 16'habcd));
    emit(i_ori(6, 6, 16'h1234));
    emit(i_jr(6));
    // code reached at 0xabcd1234 (memory offset 0x1234)
    at = 32'h0000_1234;
    emit(i_addiu(21, 0, 32'ha5));
    emit(i_j(32'h0000_2000));        // J keeps region 0xa: lands at 0xa0002000
    at = 32'h0000_2000;
    emit(i_addiu(22, 0, 32'h33));
    emit(i_addiu(7, 0, HALT_PC));
    emit(i_jr(7));                   // back to the low region
    at = HALT_PC;
    emit(i_j(HALT_PC));              // halt: jump to itself
  endfunction

  // ----------------------------------------------------- lockstep compare
  task automatic compare_cycle();
    logic [31:0] exp_inst;
    logic [31:0] pc_before = iss.pc;
    logic        rf_eff;
    logic [5:0]  op;
    exp_inst = prog.exists(pc_before & 32'h0000_ffff) ? prog[pc_before & 32'h0000_ffff] : 32'h0;
    check("pc", pc, pc_before);
    check("inst", inst, exp_inst);
    iss.step(exp_inst);
    rf_eff = rf_we && (rf_waddr != 0);
    check("reg write enable", 32'(rf_eff), 32'(iss.wr_en));
    if (iss.wr_en) begin
      check("reg write index", 32'(rf_waddr), 32'(iss.wr_reg));
      check("reg write value", rf_wdata, iss.wr_val);
    end
    if (exp_wr.exists(pc_before)) begin
      exp_hits++;
      check($sformatf("worked example at %h", pc_before), rf_wdata, exp_wr[pc_before]);
    end
    check("store enable", 32'(dmem_en && dmem_mc != 2'b00), 32'(iss.st_en));
    if (iss.st_en) begin
      check("store address", dmem_addr, iss.st_addr);
      check("store size", 32'(dmem_mc), (iss.st_bytes == 1) ? 1 : (iss.st_bytes == 2) ? 2 : 3);
      check("store data", dmem_wdata, iss.st_val);
    end
    // mechanism accounting
    op = exp_inst[31:26];
    if (op == 6'h00 && exp_inst[5:0] inside {6'h20, 6'h21, 6'h22, 6'h23, 6'h25, 6'h26, 6'h27}) mech[M_RTYPE_ALU]++;
    if (op == 6'h00 && exp_inst[5:0] inside {6'h00, 6'h02, 6'h03} && exp_inst != 0) mech[M_SHIFT]++;
    if (op inside {6'h08, 6'h09, 6'h0c, 6'h0d}) mech[M_IMM_ALU]++;
    if (op == 6'h0f) mech[M_LUI]++;
    if (op == 6'h0a || (op == 6'h00 && exp_inst[5:0] == 6'h2a)) mech[M_SLT]++;
    if (op == 6'h23) mech[M_LOAD_WORD]++;
    if (op inside {6'h20, 6'h21, 6'h24, 6'h25}) mech[M_LOAD_SUB]++;
    if (op == 6'h2b) mech[M_STORE_WORD]++;
    if (op == 6'h29) mech[M_STORE_HALF]++;
    if (op == 6'h28) mech[M_STORE_BYTE]++;
    if (op inside {6'h01, 6'h04, 6'h05, 6'h06, 6'h07}) begin
      if (iss.pc != pc_before + 4) mech[M_BR_TAKEN]++;
      else mech[M_BR_NOT_TAKEN]++;
      if (op != 6'h04 && op != 6'h05) mech[M_CMP_BRANCH]++;
    end
    if (op == 6'h02 && pc_before != HALT_PC) mech[M_JUMP]++;
    if (op == 6'h03) mech[M_JAL_LINK]++;
    if (op == 6'h00 && exp_inst[5:0] == 6'h08) mech[M_JR]++;
    if (rf_we && rf_waddr == 0 && exp_inst != 0) mech[M_R0_WRITE]++;
    if (pc_before[31:16] != 16'h0) mech[M_REGION_JUMP]++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int retired = 0;
    logic [31:0] k;
    iss = new(MEM_BITS, 32'h0);
    build_program();
    // load the program while reset is held
    rst = 1; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    @(negedge clk);
    foreach (prog[a]) begin
      prog_we = 1; prog_addr = a; prog_wdata = prog[a];
      @(negedge clk);
    end
    prog_we = 0;
    @(posedge clk); #1;
    rst = 0;                                   // released while clk is high
    // run: sample just before each falling edge
    #2;                                        // 2 time units before the falling edge
    while (pc != HALT_PC && retired < 5000) begin
      compare_cycle();
      retired++;
      @(posedge clk); #3;
    end
    // the halt loop holds the PC
    @(posedge clk); #3;
    check("halted", pc, HALT_PC);
    // one clock cycle per instruction
    check("one cycle per instruction", 32'(run_cycles), 32'(retired));
    // final register file
    for (int r = 0; r < 32; r++)
      check($sformatf("final r%0d", r), (r == 0) ? 32'h0 : dut.u_cpu.u_regfile.regs[r], iss.regs[r]);
    // data memory bytes written by the program
    foreach (iss.mem[a]) begin
      k = a;
      check($sformatf("mem byte %h", k), {24'h0, dut.u_data_mem.mem[k[MEM_BITS-1:2]][8*k[1:0] +: 8]},
            {24'h0, iss.mem[a]});
    end
    // final results that are not overwritten later
    check("worked examples seen", 32'(exp_hits), 32'(exp_wr.num()));
    check("loop ran 10 times", dut.u_cpu.u_regfile.regs[24], 32'd10);
    check("zero-compare branches", dut.u_cpu.u_regfile.regs[17], 32'd2 + 8 + 32 + 128);
    check("jal skips PC+4, returns to PC+8", dut.u_cpu.u_regfile.regs[18], 32'd1);
    check("subroutine ran", dut.u_cpu.u_regfile.regs[19], 32'd77);
    check("0xdecafe00 reached", dut.u_cpu.u_regfile.regs[20], 32'h5a);
    check("0xabcd1234 reached", dut.u_cpu.u_regfile.regs[21], 32'ha5);
    check("J kept region 0xa", dut.u_cpu.u_regfile.regs[22], 32'h33);
    check("A[12] in memory", {dut.u_data_mem.mem[(32'h100 + 48) >> 2]}, 32'd1034);
    check("byte layout word at 0", {8'h0, dut.u_data_mem.mem[0][23:16], 16'h0}, 32'h0005_0000);
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[m]);
      end
    end
    $display("instructions %0d, cycles %0d", retired, run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
