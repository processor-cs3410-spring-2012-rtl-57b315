// load_extend: turns the word read from the data memory into the value a
// load writes to the register file.
//
// The memory only reads whole words (mc = 00), so for LB/LBU the byte
// selected by addr[1:0] and for LH/LHU the halfword selected by addr[1]
// is picked out (little-endian lanes, matching mips_memory) and then
// sign- or zero-extended. LW passes the word through. Combinational.
// Where this selection happens is this design's choice; the design gives
// only the behaviour of each load.
module load_extend
  import mips_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,   // byte address bits 1:0
  input  load_size_e  size,
  input  logic        signed_ld, // 1: sign extend, 0: zero extend
  output logic [31:0] y
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;

  assign byte_v = word[8*addr_lo +: 8];
  assign half_v = addr_lo[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (size)
      LD_BYTE: y = {{24{signed_ld & byte_v[7]}}, byte_v};
      LD_HALF: y = {{16{signed_ld & half_v[15]}}, half_v};
      default: y = word;
    endcase
  end

endmodule
