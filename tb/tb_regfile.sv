// tb_regfile: self-checking test of the register file.
// Checks that writes land on the falling edge only when WE is high, that
// r0 reads zero whatever is written to it, that both read ports return
// what a reference copy holds, and that reset clears r1..r31.
module tb_regfile;
  logic        clk = 1'b0;
  logic        rst, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] w, a, b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .we, .rw, .w, .ra, .rb, .a, .b);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; rw = 0; w = 0; ra = 0; rb = 0;
    @(negedge clk); @(negedge clk);
    #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      check("reset A", a, 0);
      check("reset B", b, 0);
    end
    // writes become visible at the falling edge, not at the rising edge
    @(negedge clk); #1;
    we = 1; rw = 5'd7; w = 32'hcafe_f00d; ra = 5'd7;
    @(posedge clk); #1;
    check("no write at rising edge", a, 0);
    @(negedge clk); #1;
    check("write at falling edge", a, 32'hcafe_f00d);
    we = 0;
    model[7] = 32'hcafe_f00d;
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #1;
      we = 1'($urandom);
      rw = 5'($urandom);
      w  = $urandom;
      @(negedge clk); #1;
      if (we && rw != 0) model[rw] = w;
      ra = 5'($urandom); rb = 5'($urandom); #1;
      check("read A", a, model[ra]);
      check("read B", b, model[rb]);
    end
    // r0 stays zero
    @(posedge clk); #1; we = 1; rw = 0; w = 32'hffff_ffff; ra = 0; rb = 0;
    @(negedge clk); #1;
    check("r0 A", a, 0);
    check("r0 B", b, 0);
    // reset clears everything
    we = 0; rst = 1;
    @(negedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1;
      check("reset again", a, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
