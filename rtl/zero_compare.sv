// zero_compare: the "cmp" box of the datapath. Compares R[rs], taken as a
// signed number, with zero; the control chooses the relation:
//   CMP_LTZ a < 0 (BLTZ)   CMP_GEZ a >= 0 (BGEZ)
//   CMP_LEZ a <= 0 (BLEZ)  CMP_GTZ a > 0 (BGTZ)
// The result goes back to the control. Built from the sign bit and a
// zero detector (own choice); combinational.
module zero_compare
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  cmp_op_e     op,
  output logic        result
);

  logic neg, zero;

  assign neg  = a[31];
  assign zero = (a == 32'h0);

  always_comb begin
    unique case (op)
      CMP_LTZ: result = neg;
      CMP_GEZ: result = !neg;
      CMP_LEZ: result = neg || zero;
      CMP_GTZ: result = !neg && !zero;
    endcase
  end

endmodule
