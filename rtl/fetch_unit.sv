// fetch_unit: the instruction-fetch side of the single-cycle CPU.
//
// Holds the program counter and computes every candidate for the next PC,
// following the fetch circuit of the design:
//   pc_plus4   PC + 4 (the "+4" adder; byte addressing)
//   branch     PC + 4 + (sign_extend(offset) << 2)   (the "+" adder)
//   jump       (PC + 4)[31:28] || target || 00        (the "||" box)
//   register   R[rs]                                 (JR)
// and pc_sel (from the control) picks one of them; the PC register loads
// it on the rising edge of clk. Branch and jump targets are formed from the
// already incremented PC, as MIPS does. A second "+4" adder gives
// pc_plus8, the link address that JAL writes to r31.
//
// There is no branch delay slot: the instruction after a taken branch or
// jump is not executed (the drawn datapath has no place to hold it). The
// reset value of the PC (RESET_PC, synchronous reset) is this design's
// choice.
module fetch_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  pc_sel_e     pc_sel,
  input  logic [15:0] offset,    // branch offset, instruction bits 15:0
  input  logic [25:0] target,    // jump target, instruction bits 25:0
  input  logic [31:0] reg_target,// R[rs] for JR
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_plus8,
  output logic [31:0] pc_next
);

  logic [31:0] branch_target;
  logic [31:0] jump_target;

  assign pc_plus4      = pc + 32'd4;
  assign pc_plus8      = pc_plus4 + 32'd4;
  assign branch_target = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};
  assign jump_target   = {pc_plus4[31:28], target, 2'b00};

  always_comb begin
    unique case (pc_sel)
      PC_SEQ:    pc_next = pc_plus4;
      PC_BRANCH: pc_next = branch_target;
      PC_JUMP:   pc_next = jump_target;
      PC_REG:    pc_next = reg_target;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
