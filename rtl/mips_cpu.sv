// mips_cpu: single-cycle MIPS CPU (subset), without its memories.
//
// Every instruction runs through the five steps of the design in one
// clock cycle: fetch (PC -> program memory, PC+4), decode (control reads
// the opcode, register file reads R[rs] and R[rt]), execute (ALU), memory
// (data memory, loads and stores only) and write-back (register file).
// The blocks and their connections follow the datapath drawings:
//   - the ALU takes A = R[rs] and, through a multiplexer, either
//     B = R[rt] or the extended immediate;
//   - the shift amount is the shamt field or the constant 16 (LUI);
//   - the ALU result is the data-memory address, R[rt] the store data;
//   - a multiplexer returns either the ALU result or the loaded value, and
//     a second one in front of the register file chooses the link address
//     PC+8 for JAL;
//   - "=?" and "cmp" compare the register values for the branches and
//     report to the control, which picks the next PC (PC+4, branch target,
//     jump target or R[rs]).
//
// Timing: PC and data-memory writes happen on the rising edge of clk, the
// register file writes on the falling edge, so the result of an
// instruction must settle within the first half of its cycle. Only
// instructions that write no register (stores, branches, jumps other than
// JAL) depend on register values at the rising edge, so the mid-cycle
// register write never disturbs them. Program memory and data memory are
// outside (Harvard organisation); both are read combinationally.
//
// Reset (synchronous, active high) is seen by the PC on rising edges and
// by the register file on falling edges; release it while clk is high
// (just after a rising edge) so the first instruction gets a whole cycle.
// The data memory is disabled while rst is high.
//
// Own choices: which destination multiplexer input R_W uses (rd for
// R-type, rt for I-type, 31 for JAL), where byte and halfword loads are
// extracted (load_extend), and the no-delay-slot behaviour of fetch_unit.
module mips_cpu
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  // program memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic        dmem_en,
  output logic [1:0]  dmem_mc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata
);

  ctrl_t       ctrl;
  pc_sel_e     pc_sel;
  logic [31:0] pc_plus8;
  logic [31:0] rs_val, rt_val;
  logic [31:0] imm_ext, alu_b, alu_y, load_val, wb_val;
  logic [4:0]  shamt;
  logic        eq, cmp_result;
  rtype_t      r;
  itype_t      i_f;
  jtype_t      j_f;

  // ------------------------------------------------------------ fetch
  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst,
    .pc_sel,
    .offset     (i_f.imm),
    .target     (j_f.target),
    .reg_target (rs_val),
    .pc,
    .pc_plus4   (),
    .pc_plus8,
    .pc_next    ()
  );

  assign imem_addr = pc;
  assign inst      = imem_rdata;
  assign r         = rtype_t'(inst);
  assign i_f       = itype_t'(inst);
  assign j_f       = jtype_t'(inst);

  // ----------------------------------------------------------- decode
  control u_control (
    .inst,
    .eq,
    .cmp_result,
    .ctrl,
    .pc_sel
  );

  always_comb begin
    unique case (ctrl.dst_sel)
      DST_RT:  rf_waddr = r.rt;
      DST_RA:  rf_waddr = REG_RA;
      default: rf_waddr = r.rd;
    endcase
  end

  assign rf_we = ctrl.reg_we;

  regfile u_regfile (
    .clk, .rst,
    .we (rf_we),
    .rw (rf_waddr),
    .w  (rf_wdata),
    .ra (r.rs),
    .rb (r.rt),
    .a  (rs_val),
    .b  (rt_val)
  );

  imm_extend u_ext (
    .imm  (i_f.imm),
    .sign (ctrl.ext_sign),
    .y    (imm_ext)
  );

  eq_compare u_eq (
    .a  (rs_val),
    .b  (rt_val),
    .eq
  );

  zero_compare u_cmp (
    .a      (rs_val),
    .op     (ctrl.cmp_op),
    .result (cmp_result)
  );

  // ---------------------------------------------------------- execute
  assign alu_b = ctrl.alu_src_imm ? imm_ext : rt_val;
  assign shamt = ctrl.shamt16 ? 5'd16 : r.shamt;

  alu u_alu (
    .op    (ctrl.alu_op),
    .a     (rs_val),
    .b     (alu_b),
    .shamt,
    .y     (alu_y)
  );

  // ----------------------------------------------------------- memory
  assign dmem_en    = ctrl.mem_en && !rst;   // no stores while held in reset
  assign dmem_mc    = ctrl.mem_mc;
  assign dmem_addr  = alu_y;
  assign dmem_wdata = rt_val;

  load_extend u_ld (
    .word      (dmem_rdata),
    .addr_lo   (alu_y[1:0]),
    .size      (ctrl.ld_size),
    .signed_ld (ctrl.ld_signed),
    .y         (load_val)
  );

  // ------------------------------------------------------- write-back
  assign wb_val = (ctrl.wb_sel == WB_MEM) ? load_val : alu_y;
  assign rf_wdata = (ctrl.wb_sel == WB_LINK) ? pc_plus8 : wb_val;

endmodule
