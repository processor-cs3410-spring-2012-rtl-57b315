// tb_mips_cpu: test of the CPU on its own, with the program memory and
// the data memory modelled in the testbench (plain arrays, little endian,
// combinational read, write on the rising edge).
//
// Runs the four walk-through instructions of the design (ADDU, SLTI, LW,
// J) followed by the "Levels of Interpretation" loop
//   addi r2, r0, 10 ; addi r1, r0, 0 ; loop: slt r3, r1, r2 ; ...
// which counts r1 from 0 to 10, and checks the results by hand-worked
// values, the machine-code words printed for the loop's first three
// instructions, and the cycle count: one instruction per clock cycle.
//
// A second phase resets the CPU and runs a random program (register and
// immediate ALU operations, shifts, LUI, aligned loads and stores of all
// sizes, short forward branches of every kind) in lockstep with the
// reference model mips_iss: every cycle the PC, the register write and
// the store must match.
module tb_mips_cpu;
  import mips_asm_pkg::*;

  logic        clk = 1'b0, rst;
  logic [31:0] imem_addr, imem_rdata;
  logic        dmem_en;
  logic [1:0]  dmem_mc;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] pc, inst, rf_wdata;
  logic        rf_we;
  logic [4:0]  rf_waddr;

  logic [31:0] imem [256];
  logic [31:0] dmem [256];
  int checks = 0, failures = 0;

  mips_cpu dut (
    .clk, .rst, .imem_addr, .imem_rdata,
    .dmem_en, .dmem_mc, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .pc, .inst, .rf_we, .rf_waddr, .rf_wdata
  );

  always #5 clk = ~clk;

  assign imem_rdata = imem[imem_addr[9:2]];
  assign dmem_rdata = (dmem_en && dmem_mc == 2'b00) ? dmem[dmem_addr[9:2]] : 32'h0;

  always @(posedge clk) begin
    if (dmem_en) begin
      case (dmem_mc)
        2'b01: dmem[dmem_addr[9:2]][8*dmem_addr[1:0] +: 8]   <= dmem_wdata[7:0];
        2'b10: dmem[dmem_addr[9:2]][16*dmem_addr[1] +: 16]   <= dmem_wdata[15:0];
        2'b11: dmem[dmem_addr[9:2]]                          <= dmem_wdata;
        default: ;
      endcase
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rf(int r);
    return (r == 0) ? 32'h0 : dut.u_regfile.regs[r];
  endfunction

  // ------------------------------------------------ random lockstep phase
  localparam int RAND_LEN = 200;
  localparam logic [31:0] RAND_HALT = 32'(RAND_LEN * 4);

  function automatic logic [31:0] rand_inst(int pos);
    int rd = $urandom_range(1, 15), rs = $urandom_range(0, 15), rt = $urandom_range(0, 15);
    int imm = $urandom_range(0, 32'hffff);
    int off;
    case ($urandom_range(0, 27))
      0:  return i_add (rd, rs, rt);
      1:  return i_addu(rd, rs, rt);
      2:  return i_sub (rd, rs, rt);
      3:  return i_subu(rd, rs, rt);
      4:  return i_or  (rd, rs, rt);
      5:  return i_xor (rd, rs, rt);
      6:  return i_nor (rd, rs, rt);
      7:  return i_slt (rd, rs, rt);
      8:  return i_sll (rd, rt, $urandom_range(0, 31));
      9:  return i_srl (rd, rt, $urandom_range(0, 31));
      10: return i_sra (rd, rt, $urandom_range(0, 31));
      11: return i_addi (rd, rs, imm);
      12: return i_addiu(rd, rs, imm);
      13: return i_slti (rd, rs, imm);
      14: return i_andi (rd, rs, imm);
      15: return i_ori  (rd, rs, imm);
      16: return i_lui  (rd, imm);
      // memory: base r0, so the address is the offset (0..1023, aligned)
      17: return i_lw (rd, $urandom_range(0, 255) * 4, 0);
      18: return i_lh (rd, $urandom_range(0, 511) * 2, 0);
      19: return i_lhu(rd, $urandom_range(0, 511) * 2, 0);
      20: return i_lb (rd, $urandom_range(0, 1023), 0);
      21: return i_lbu(rd, $urandom_range(0, 1023), 0);
      22: return i_sw (rt, $urandom_range(0, 255) * 4, 0);
      23: return i_sh (rt, $urandom_range(0, 511) * 2, 0);
      24: return i_sb (rt, $urandom_range(0, 1023), 0);
      default: begin
        // forward branch that stays inside the program
        off = (pos + 4 < RAND_LEN) ? $urandom_range(0, 3) : 0;
        case ($urandom_range(0, 5))
          0: return i_beq (rs, rt, off);
          1: return i_bne (rs, rt, off);
          2: return i_bltz(rs, off);
          3: return i_bgez(rs, off);
          4: return i_blez(rs, off);
          default: return i_bgtz(rs, off);
        endcase
      end
    endcase
  endfunction

  task automatic random_program();
    mips_iss iss = new(10, 32'h0);
    int n = 0, steps = 0;
    logic [31:0] exp_inst;
    foreach (imem[i]) imem[i] = 32'h0;
    foreach (dmem[i]) dmem[i] = 32'h0;
    // give r1..r15 random values first
    for (int r = 1; r < 16; r++) begin
      imem[n++] = i_lui(r, $urandom_range(0, 32'hffff));
      imem[n++] = i_ori(r, r, $urandom_range(0, 32'hffff));
    end
    while (n < RAND_LEN) begin
      imem[n] = rand_inst(n);
      n++;
    end
    imem[n] = i_j(RAND_HALT);
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (iss.pc != RAND_HALT && steps < 2 * RAND_LEN) begin
      exp_inst = imem[iss.pc[9:2]];
      check("random: pc", pc, iss.pc);
      iss.step(exp_inst);
      check("random: register write", {31'h0, rf_we && rf_waddr != 0}, {31'h0, iss.wr_en});
      if (iss.wr_en) begin
        check("random: written register", {27'h0, rf_waddr}, {27'h0, iss.wr_reg});
        check("random: written value", rf_wdata, iss.wr_val);
      end
      check("random: store", {31'h0, dmem_en && dmem_mc != 2'b00}, {31'h0, iss.st_en});
      if (iss.st_en) begin
        check("random: store address", dmem_addr, iss.st_addr);
        check("random: store size", {30'h0, dmem_mc},
              (iss.st_bytes == 1) ? 32'd1 : (iss.st_bytes == 2) ? 32'd2 : 32'd3);
        check("random: store data", dmem_wdata, iss.st_val);
      end
      @(posedge clk); #1;
      steps++;
    end
    check("random: reached the end", pc, RAND_HALT);
    for (int r = 1; r < 32; r++) check("random: final register", rf(r), iss.regs[r]);
    for (int w = 0; w < 256; w++) check("random: final memory", dmem[w], iss.rd32(32'(w * 4)));
  endtask

  int cyc = 0;
  always @(negedge clk) if (!rst) cyc++;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    foreach (imem[i]) imem[i] = 32'h0;
    foreach (dmem[i]) dmem[i] = 32'h0;
    // setup: s2 (r18) = 3, s3 (r19) = 0x40, Mem[0x54] = 0x1234abcd
    imem[n++] = i_addiu(18, 0, 3);
    imem[n++] = i_addiu(19, 0, 32'h40);
    dmem[32'h54 >> 2] = 32'h1234_abcd;
    // walk-through: addu s0, s2, s3 ; slti s0, s2, 4 ; lw s0, 20(s3) ; j
    imem[n++] = i_addu(16, 18, 19);      // s0 = 0x43
    imem[n++] = i_addu(20, 16, 0);       // keep it in r20
    imem[n++] = i_slti(16, 18, 4);       // s0 = 1
    imem[n++] = i_addu(21, 16, 0);
    imem[n++] = i_lw(16, 20, 19);        // s0 = Mem[0x54]
    imem[n++] = i_j(32'h0000_0100);      // to the loop
    imem[n++] = i_addiu(16, 0, 99);      // must not run
    // loop at 0x100
    n = 32'h100 >> 2;
    imem[n++] = 32'b00100000000000100000000000001010;  // addi r2, r0, 10
    imem[n++] = i_addi(1, 0, 0);
    imem[n++] = 32'b00000000001000100001100000101010;  // slt r3, r1, r2
    imem[n++] = i_beq(3, 0, 2);
    imem[n++] = i_addiu(1, 1, 1);
    imem[n++] = i_j(32'h0000_0108);
    imem[n++] = i_sw(1, 0, 19);          // Mem[0x40] = 10
    imem[n++] = i_j(32'h0000_011c);      // halt at 0x11c
    check("encoding addi", imem[32'h100 >> 2], i_addi(2, 0, 10));
    check("encoding slt", imem[32'h108 >> 2], i_slt(3, 1, 2));

    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    wait (pc == 32'h0000_011c);
    @(negedge clk); #1;
    check("addu s0 = s2 + s3", rf(20), 32'h43);
    check("slti s0 = (s2 < 4)", rf(21), 32'h1);
    check("lw s0 = Mem[s3 + 20]", rf(16), 32'h1234_abcd);
    check("loop r1", rf(1), 32'd10);
    check("loop r2", rf(2), 32'd10);
    check("loop r3", rf(3), 32'd0);
    check("store after loop", dmem[32'h40 >> 2], 32'd10);
    // 8 straight-line + 2 + 10 x (slt, beq, addiu, j) + final slt, beq
    // + sw, then the first cycle of the halting jump
    check("cycles: one per instruction", 32'(cyc), 32'(8 + 2 + 40 + 2 + 2));
    random_program();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
