// imm_extend: the "extend" box of the datapath. Widens the 16-bit
// immediate of an I-type instruction to 32 bits, copying bit 15 into the
// upper half when sign is high (ADDIU, SLTI, loads, stores, branch
// offsets) and filling it with zeros otherwise (ANDI, ORI, LUI).
// Combinational.
module imm_extend (
  input  logic [15:0] imm,
  input  logic        sign,   // 1: sign extend, 0: zero extend
  output logic [31:0] y
);

  assign y = {{16{sign & imm[15]}}, imm};

endmodule
