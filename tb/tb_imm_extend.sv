// tb_imm_extend: exhaustive test of the immediate extender: every 16-bit
// value, sign- and zero-extended, against integer arithmetic.
module tb_imm_extend;
  logic [15:0] imm;
  logic        sign;
  logic [31:0] y;
  int checks = 0, failures = 0;

  imm_extend dut (.imm, .sign, .y);

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      automatic int sv = (v >= 32768) ? v - 65536 : v;
      imm = 16'(v);
      sign = 1; #1;
      checks++;
      if (y !== 32'(sv)) begin failures++; $display("FAIL sext %h -> %h", imm, y); end
      sign = 0; #1;
      checks++;
      if (y !== 32'(v)) begin failures++; $display("FAIL zext %h -> %h", imm, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
