// tb_eq_compare: test of the "=?" comparator with equal pairs, pairs that
// differ in a single bit (every position) and random pairs.
module tb_eq_compare;
  logic [31:0] a, b;
  logic        eq;
  int checks = 0, failures = 0;

  eq_compare dut (.a, .b, .eq);

  task automatic try(logic [31:0] x, logic [31:0] z);
    a = x; b = z; #1;
    checks++;
    if (eq !== (x == z)) begin failures++; $display("FAIL %h %h -> %b", x, z, eq); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic logic [31:0] v = $urandom;
      try(v, v);
      for (int i = 0; i < 32; i++) try(v, v ^ (32'h1 << i));
      try(v, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
