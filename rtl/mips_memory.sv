// mips_memory: byte-addressed memory with a 32-bit data path, used both as
// the data memory and as the program memory of the CPU.
//
// Interface as in the design: a 32-bit address, 32-bit write data in,
// 32-bit read data out, an enable E (en) and a 2-bit memory control mc:
//   00 read word      (4-byte aligned)
//   01 write byte     (low byte of wdata to the addressed byte)
//   10 write halfword (low half of wdata, 2-byte aligned)
//   11 write word     (4-byte aligned)
// Bytes are ordered little endian inside a word: byte address 4k+0 holds
// bits 7:0 of word k.
//
// Timing (own choice): reads are combinational, so a single-cycle CPU can
// fetch and load within its cycle; rdata is the aligned word at addr when
// en is high and mc is 00, and zero otherwise. Writes take effect on the
// rising edge of clk. Halfword and word writes must be aligned, as the
// design requires (assertions check it in simulation; in hardware the low
// address bits are ignored and the access is rounded down). Bits
// above ADDR_BITS are ignored, so the memory repeats through the 32-bit
// space. The design allows up to 32 address bits; ADDR_BITS is the number
// actually backed by storage.
module mips_memory
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16   // bytes of storage = 2**ADDR_BITS
) (
  input  logic        clk,
  input  logic        en,      // E
  input  logic [1:0]  mc,      // memory control
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned WORDS = 2 ** (ADDR_BITS - 2);

  logic [31:0] mem [WORDS];

  logic [ADDR_BITS-3:0] widx;
  logic [3:0]           bmask;   // byte lanes written
  logic [31:0]          wword;   // write data placed in its lanes

  assign widx = addr[ADDR_BITS-1:2];

  always_comb begin
    bmask = 4'b0000;
    wword = wdata;
    unique case (mem_ctrl_e'(mc))
      MC_READ_WORD: bmask = 4'b0000;
      MC_WRITE_BYTE: begin
        bmask = 4'b0001 << addr[1:0];
        wword = {4{wdata[7:0]}};
      end
      MC_WRITE_HALF: begin
        bmask = addr[1] ? 4'b1100 : 4'b0011;
        wword = {2{wdata[15:0]}};
      end
      MC_WRITE_WORD: bmask = 4'b1111;
    endcase
    if (!en) bmask = 4'b0000;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      if (bmask[i]) mem[widx][8*i +: 8] <= wword[8*i +: 8];
  end

  assign rdata = (en && mc == MC_READ_WORD) ? mem[widx] : 32'h0;

  // Alignment rules of the memory control codes. Reads are not checked:
  // byte and halfword loads read the word that holds them.
  a_half_aligned: assert property (@(posedge clk) en && mc == MC_WRITE_HALF |-> addr[0] == 1'b0)
    else $error("halfword write to odd address %h", addr);
  a_word_aligned: assert property (@(posedge clk) en && mc == MC_WRITE_WORD |-> addr[1:0] == 2'b00)
    else $error("word write to unaligned address %h", addr);

endmodule
