// tb_alu: self-checking test of the ALU. Every operation is driven with
// corner values and random operands and compared with a reference written
// with plain arithmetic (shifts computed bit by bit).
module tb_alu;
  import mips_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .shamt, .y);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z, int s);
    logic [31:0] r;
    case (o)
      ALU_ADD: r = x + z;
      ALU_SUB: r = x + ~z + 1;
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_NOR: r = ~x & ~z;
      ALU_SLT: r = (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, (x < z)};
      ALU_SLL: for (int i = 0; i < 32; i++) r[i] = (i >= s) ? z[i - s] : 1'b0;
      ALU_SRL: for (int i = 0; i < 32; i++) r[i] = (i + s <= 31) ? z[i + s] : 1'b0;
      ALU_SRA: for (int i = 0; i < 32; i++) r[i] = (i + s <= 31) ? z[i + s] : z[31];
      default: r = 0;
    endcase
    return r;
  endfunction

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    logic [31:0] e;
    op = o; a = x; b = z; shamt = s; #1;
    e = ref_alu(o, x, z, int'(s));
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s a=%h b=%h sh=%0d: got %h expected %h", o.name(), x, z, s, y, e);
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
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'hdead_beef};
    for (int o = 0; o <= int'(ALU_SRA); o++)
      foreach (corner[i]) foreach (corner[j]) try(alu_op_e'(o), corner[i], corner[j], 5'(i * 7 + j));
    for (int n = 0; n < 4000; n++)
      try(alu_op_e'($urandom_range(0, int'(ALU_SRA))), $urandom, $urandom, 5'($urandom));
    // examples from the instruction tables
    try(ALU_SLL, 0, 32'h3, 5'd3);              // r5 = r3 * 8
    check_val(32'h18);
    try(ALU_SLL, 0, 32'hbeef, 5'd16);          // LUI-style shift by 16
    check_val(32'hbeef_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_val(logic [31:0] e);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL example: got %h expected %h", y, e);
    end
  endtask
endmodule
