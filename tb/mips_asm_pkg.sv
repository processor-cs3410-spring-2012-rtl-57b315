// mips_asm_pkg: helpers for the testbenches of the single-cycle MIPS CPU.
//
// - Encoder functions that build 32-bit instruction words from mnemonic
//   and operands (register numbers as integers), written from the MIPS
//   instruction formats: R-type op|rs|rt|rd|shamt|funct, I-type
//   op|rs|rt|imm16, J-type op|target26.
// - mips_iss, a plain instruction-level reference model of the same
//   instruction subset (no delay slot, little-endian byte order, ADD/SUB/
//   ADDI without overflow traps, unknown encodings as no-ops). It is
//   written independently of the RTL and is used to predict every
//   register write, every memory write and the next PC.
package mips_asm_pkg;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(int rs, int rt, int rd, int sh, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] addr);
    return {op, addr[27:2]};
  endfunction

  function automatic logic [31:0] i_add (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h20); endfunction
  function automatic logic [31:0] i_addu(int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h21); endfunction
  function automatic logic [31:0] i_sub (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h22); endfunction
  function automatic logic [31:0] i_subu(int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h23); endfunction
  function automatic logic [31:0] i_or  (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h25); endfunction
  function automatic logic [31:0] i_xor (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h26); endfunction
  function automatic logic [31:0] i_nor (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h27); endfunction
  function automatic logic [31:0] i_slt (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h2a); endfunction
  function automatic logic [31:0] i_sll (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h00); endfunction
  function automatic logic [31:0] i_srl (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h02); endfunction
  function automatic logic [31:0] i_sra (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h03); endfunction
  function automatic logic [31:0] i_jr  (int rs);                 return enc_r(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] i_nop ();                       return 32'h0; endfunction

  function automatic logic [31:0] i_addi (int rt, int rs, int imm); return enc_i(6'h08, rs, rt, imm); endfunction
  function automatic logic [31:0] i_addiu(int rt, int rs, int imm); return enc_i(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] i_slti (int rt, int rs, int imm); return enc_i(6'h0a, rs, rt, imm); endfunction
  function automatic logic [31:0] i_andi (int rt, int rs, int imm); return enc_i(6'h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] i_ori  (int rt, int rs, int imm); return enc_i(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] i_lui  (int rt, int imm);         return enc_i(6'h0f, 0, rt, imm); endfunction

  function automatic logic [31:0] i_lb (int rt, int off, int rs); return enc_i(6'h20, rs, rt, off); endfunction
  function automatic logic [31:0] i_lh (int rt, int off, int rs); return enc_i(6'h21, rs, rt, off); endfunction
  function automatic logic [31:0] i_lw (int rt, int off, int rs); return enc_i(6'h23, rs, rt, off); endfunction
  function automatic logic [31:0] i_lbu(int rt, int off, int rs); return enc_i(6'h24, rs, rt, off); endfunction
  function automatic logic [31:0] i_lhu(int rt, int off, int rs); return enc_i(6'h25, rs, rt, off); endfunction
  function automatic logic [31:0] i_sb (int rt, int off, int rs); return enc_i(6'h28, rs, rt, off); endfunction
  function automatic logic [31:0] i_sh (int rt, int off, int rs); return enc_i(6'h29, rs, rt, off); endfunction
  function automatic logic [31:0] i_sw (int rt, int off, int rs); return enc_i(6'h2b, rs, rt, off); endfunction

  // branches: offset in instructions, relative to PC+4
  function automatic logic [31:0] i_beq (int rs, int rt, int off); return enc_i(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] i_bne (int rs, int rt, int off); return enc_i(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] i_bltz(int rs, int off);         return enc_i(6'h01, rs, 0, off); endfunction
  function automatic logic [31:0] i_bgez(int rs, int off);         return enc_i(6'h01, rs, 1, off); endfunction
  function automatic logic [31:0] i_blez(int rs, int off);         return enc_i(6'h06, rs, 0, off); endfunction
  function automatic logic [31:0] i_bgtz(int rs, int off);         return enc_i(6'h07, rs, 0, off); endfunction

  function automatic logic [31:0] i_j  (logic [31:0] addr); return enc_j(6'h02, addr); endfunction
  function automatic logic [31:0] i_jal(logic [31:0] addr); return enc_j(6'h03, addr); endfunction

  // ------------------------------------------------------- reference model
  class mips_iss;
    logic [31:0] regs [32];
    logic [7:0]  mem [logic [31:0]];   // byte-addressed data memory
    logic [31:0] pc;
    int unsigned addr_mask;            // data memory wraps like the RTL

    // effects of the last step
    logic        wr_en;
    logic [4:0]  wr_reg;
    logic [31:0] wr_val;
    logic        st_en;
    logic [31:0] st_addr;
    int          st_bytes;
    logic [31:0] st_val;

    function new(int addr_bits, logic [31:0] reset_pc);
      addr_mask = (addr_bits >= 32) ? 32'hffff_ffff : ((32'h1 << addr_bits) - 1);
      pc = reset_pc;
      foreach (regs[i]) regs[i] = '0;
    endfunction

    function logic [7:0] rd8(logic [31:0] a);
      logic [31:0] k = a & addr_mask;
      return mem.exists(k) ? mem[k] : 8'h00;
    endfunction

    function void wr8(logic [31:0] a, logic [7:0] v);
      mem[a & addr_mask] = v;
    endfunction

    function logic [31:0] rd32(logic [31:0] a);
      logic [31:0] b = {a[31:2], 2'b00};
      return {rd8(b + 3), rd8(b + 2), rd8(b + 1), rd8(b)};
    endfunction

    // Execute one instruction.
    function void step(logic [31:0] inst);
      logic [5:0]  op = inst[31:26];
      logic [4:0]  rs = inst[25:21], rt = inst[20:16], rd = inst[15:11], sh = inst[10:6];
      logic [5:0]  fn = inst[5:0];
      logic [31:0] a = regs[rs], b = regs[rt];
      logic [31:0] se = {{16{inst[15]}}, inst[15:0]};
      logic [31:0] ze = {16'h0, inst[15:0]};
      logic [31:0] npc = pc + 4;
      logic [31:0] btgt = pc + 4 + (se << 2);
      logic [31:0] ea = a + se;
      wr_en = 0; wr_reg = 0; wr_val = 0; st_en = 0; st_addr = 0; st_bytes = 0; st_val = 0;
      case (op)
        6'h00: begin
          wr_en = 1; wr_reg = rd;
          case (fn)
            6'h20, 6'h21: wr_val = a + b;
            6'h22, 6'h23: wr_val = a - b;
            6'h25: wr_val = a | b;
            6'h26: wr_val = a ^ b;
            6'h27: wr_val = ~(a | b);
            6'h2a: wr_val = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h00: wr_val = b << sh;
            6'h02: wr_val = b >> sh;
            6'h03: wr_val = $signed(b) >>> sh;
            6'h08: begin wr_en = 0; npc = a; end
            default: wr_en = 0;
          endcase
        end
        6'h08, 6'h09: begin wr_en = 1; wr_reg = rt; wr_val = a + se; end
        6'h0a: begin wr_en = 1; wr_reg = rt; wr_val = ($signed(a) < $signed(se)) ? 1 : 0; end
        6'h0c: begin wr_en = 1; wr_reg = rt; wr_val = a & ze; end
        6'h0d: begin wr_en = 1; wr_reg = rt; wr_val = a | ze; end
        6'h0f: begin wr_en = 1; wr_reg = rt; wr_val = {inst[15:0], 16'h0}; end
        6'h20: begin
          logic [7:0] v = rd8(ea);
          wr_en = 1; wr_reg = rt; wr_val = {{24{v[7]}}, v};
        end
        6'h24: begin wr_en = 1; wr_reg = rt; wr_val = {24'h0, rd8(ea)}; end
        6'h21: begin
          logic [31:0] h = {ea[31:1], 1'b0};
          logic [7:0] hi = rd8(h + 1);
          wr_en = 1; wr_reg = rt; wr_val = {{16{hi[7]}}, hi, rd8(h)};
        end
        6'h25: begin
          logic [31:0] h = {ea[31:1], 1'b0};
          wr_en = 1; wr_reg = rt; wr_val = {16'h0, rd8(h + 1), rd8(h)};
        end
        6'h23: begin wr_en = 1; wr_reg = rt; wr_val = rd32(ea); end
        6'h28: begin st_en = 1; st_addr = ea; st_bytes = 1; st_val = b; wr8(ea, b[7:0]); end
        6'h29: begin
          logic [31:0] h = {ea[31:1], 1'b0};
          st_en = 1; st_addr = ea; st_bytes = 2; st_val = b;
          wr8(h, b[7:0]); wr8(h + 1, b[15:8]);
        end
        6'h2b: begin
          logic [31:0] w = {ea[31:2], 2'b00};
          st_en = 1; st_addr = ea; st_bytes = 4; st_val = b;
          wr8(w, b[7:0]); wr8(w + 1, b[15:8]); wr8(w + 2, b[23:16]); wr8(w + 3, b[31:24]);
        end
        6'h02: npc = {npc[31:28], inst[25:0], 2'b00};
        6'h03: begin
          wr_en = 1; wr_reg = 31; wr_val = pc + 8;
          npc = {npc[31:28], inst[25:0], 2'b00};
        end
        6'h04: if (a == b) npc = btgt;
        6'h05: if (a != b) npc = btgt;
        6'h01: begin
          if (rt == 0 && $signed(a) <  0) npc = btgt;
          if (rt == 1 && $signed(a) >= 0) npc = btgt;
        end
        6'h06: if ($signed(a) <= 0) npc = btgt;
        6'h07: if ($signed(a) >  0) npc = btgt;
        default: ;
      endcase
      if (wr_en && wr_reg != 0) regs[wr_reg] = wr_val;
      if (wr_reg == 0) wr_en = 0;
      pc = npc;
    endfunction
  endclass

endpackage
