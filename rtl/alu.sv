// alu: the arithmetic and logic unit of the single-cycle CPU.
//
// Inputs are the two operands a and b, a 5-bit shift amount and the
// operation. Shifts act on b (the rt operand), as MIPS shifts do; all
// other operations combine a and b. Purely combinational.
//   ALU_ADD a + b          ALU_SUB a - b
//   ALU_AND a & b          ALU_OR  a | b
//   ALU_XOR a ^ b          ALU_NOR ~(a | b)
//   ALU_SLT 1 if a < b as signed numbers, else 0
//   ALU_SLL b << shamt     ALU_SRL b >> shamt (zero fill)
//   ALU_SRA b >> shamt (sign fill)
// The set of operations follows the instructions of the design; the
// design shows the ALU only as a block, so its inside (one adder for
// add/sub, a shifter, a result multiplexer) is this design's own.
// Overflow is not detected.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLT: y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      ALU_SRA: y = 32'($signed(b) >>> shamt);
      default: y = 32'h0;
    endcase
  end

endmodule
