// mips_top: the complete computer of the design, a single-cycle MIPS CPU
// with a separate program memory and data memory (a Harvard organisation:
// instructions and data travel on different buses, so an instruction can
// be fetched and a load or store served in the same cycle).
//
// Both memories are instances of mips_memory with 2**MEM_ADDR_BITS bytes.
// The program memory is read with mc = 00 and E = 1, addressed by the PC.
// How a program gets into the program memory is not part of the design;
// here it is written through the prog_* port while rst is high (own
// choice), using the memory's word-write code. The outputs expose the PC,
// the instruction, the register-file write port and the data-memory bus
// so that a program's progress can be followed from outside.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 16,     // bytes per memory = 2**MEM_ADDR_BITS
  parameter logic [31:0] RESET_PC      = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  // program loading, only while rst is high
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dmem_en,
  output logic [1:0]  dmem_mc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata
);

  logic [31:0] imem_addr, imem_rdata;
  logic        loading;

  assign loading = rst && prog_we;

  mips_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst,
    .imem_addr,
    .imem_rdata,
    .dmem_en,
    .dmem_mc,
    .dmem_addr,
    .dmem_wdata,
    .dmem_rdata,
    .pc,
    .inst,
    .rf_we,
    .rf_waddr,
    .rf_wdata
  );

  mips_memory #(.ADDR_BITS(MEM_ADDR_BITS)) u_prog_mem (
    .clk,
    .en    (1'b1),
    .mc    (loading ? MC_WRITE_WORD : MC_READ_WORD),
    .addr  (loading ? prog_addr : imem_addr),
    .wdata (prog_wdata),
    .rdata (imem_rdata)
  );

  mips_memory #(.ADDR_BITS(MEM_ADDR_BITS)) u_data_mem (
    .clk,
    .en    (dmem_en),
    .mc    (dmem_mc),
    .addr  (dmem_addr),
    .wdata (dmem_wdata),
    .rdata (dmem_rdata)
  );

endmodule
