// tb_fetch_unit: test of the PC and next-PC logic. A reference PC is
// advanced by the same rules (PC+4, branch to PC+4+offset*4, jump within
// the 256 MB region of PC+4, jump to a register) for random choices, and
// the PC, PC+4, PC+8 and the chosen next PC are compared every cycle. The
// PC must move exactly once per clock cycle. Includes a jump from the last
// word of a region (0x0ffffffc) whose region bits come from PC+4.
module tb_fetch_unit;
  import mips_pkg::*;
  logic        clk = 1'b0, rst;
  pc_sel_e     pc_sel;
  logic [15:0] offset;
  logic [25:0] target;
  logic [31:0] reg_target, pc, pc_plus4, pc_plus8, pc_next;
  logic [31:0] model_pc;
  int checks = 0, failures = 0;

  fetch_unit #(.RESET_PC(32'h0040_0000)) dut (
    .clk, .rst, .pc_sel, .offset, .target, .reg_target,
    .pc, .pc_plus4, .pc_plus8, .pc_next
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] expected_next(logic [31:0] p);
    case (pc_sel)
      PC_SEQ:    return p + 4;
      PC_BRANCH: return p + 4 + 4 * int'(signed'(offset));
      PC_JUMP:   return {p[31:28] + ((p[27:0] == 28'hffffffc) ? 4'd1 : 4'd0), target, 2'b00};
      default:   return reg_target;
    endcase
  endfunction

  task automatic cycle(pc_sel_e s, logic [15:0] off, logic [25:0] t, logic [31:0] r);
    @(negedge clk);
    pc_sel = s; offset = off; target = t; reg_target = r; #1;
    check("pc", pc, model_pc);
    check("pc+4", pc_plus4, model_pc + 4);
    check("pc+8", pc_plus8, model_pc + 8);
    check("next", pc_next, expected_next(model_pc));
    model_pc = expected_next(model_pc);
    @(posedge clk); #1;
    check("pc after edge", pc, model_pc);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pc_sel = PC_SEQ; offset = 0; target = 0; reg_target = 0;
    @(posedge clk); @(posedge clk); #1;
    check("reset pc", pc, 32'h0040_0000);
    rst = 0;
    model_pc = 32'h0040_0000;
    cycle(PC_SEQ, 0, 0, 0);
    cycle(PC_BRANCH, 16'hffff, 0, 0);      // branch to itself + 0: offset -1
    cycle(PC_BRANCH, 16'd3, 0, 0);
    cycle(PC_JUMP, 0, 26'h37ab6fb, 0);       // j 0xdeadbeec within region 0
    cycle(PC_REG, 0, 0, 32'h0fff_fffc);      // jr to the last word of region 0
    cycle(PC_JUMP, 0, 26'h0000010, 0);       // region bits come from PC+4
    check("region from PC+4", pc, 32'h1000_0040);
    for (int n = 0; n < 2000; n++)
      cycle(pc_sel_e'($urandom_range(0, 3)), 16'($urandom), 26'($urandom), $urandom & 32'hffff_fffc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
