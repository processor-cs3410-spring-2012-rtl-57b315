// eq_compare: the "=?" box of the datapath. Reports whether the two values
// read from the register file (R[rs] and R[rt]) are equal; the control
// uses it to resolve BEQ and BNE. Combinational.
module eq_compare (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        eq
);

  assign eq = ((a ^ b) == 32'h0);

endmodule
