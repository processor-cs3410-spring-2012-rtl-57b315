// tb_zero_compare: test of the "cmp" box. All four relations against zero
// on 0, +1, -1, the extreme values and random numbers.
module tb_zero_compare;
  import mips_pkg::*;
  logic [31:0] a;
  cmp_op_e     op;
  logic        result;
  int checks = 0, failures = 0;

  zero_compare dut (.a, .op, .result);

  task automatic try(logic [31:0] x);
    int signed s = int'(x);
    logic exp [4];
    exp[CMP_LTZ] = (s < 0);
    exp[CMP_GEZ] = (s >= 0);
    exp[CMP_LEZ] = (s <= 0);
    exp[CMP_GTZ] = (s > 0);
    for (int o = 0; o < 4; o++) begin
      a = x; op = cmp_op_e'(o); #1;
      checks++;
      if (result !== exp[o]) begin failures++; $display("FAIL op %0d a=%h -> %b", o, x, result); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0); try(1); try(32'hffff_ffff); try(32'h8000_0000); try(32'h7fff_ffff);
    for (int n = 0; n < 1000; n++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
