// tb_mips_memory: self-checking test of the byte-addressed memory.
// A byte-array reference model predicts every word read after random
// byte, halfword and word writes (little-endian lanes). Also checks that
// nothing is written while E is low, that reads return zero unless E is
// high with mc = 00, the byte-layout example (store byte 5 at address 2)
// and the word 0x12345678 at address 1000 seen as bytes.
module tb_mips_memory;
  localparam int AB = 10;
  logic        clk = 1'b0;
  logic        en;
  logic [1:0]  mc;
  logic [31:0] addr, wdata, rdata;
  logic [7:0]  model [2**AB];
  int checks = 0, failures = 0;

  mips_memory #(.ADDR_BITS(AB)) dut (.clk, .en, .mc, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(logic [1:0] c, logic [31:0] ad, logic [31:0] d, logic e = 1'b1);
    @(negedge clk);
    en = e; mc = c; addr = ad; wdata = d;
    @(posedge clk); #1;
    if (e) begin
      logic [AB-1:0] k = ad[AB-1:0];
      unique case (c)
        2'b01: model[k] = d[7:0];
        2'b10: begin model[{k[AB-1:1], 1'b0}] = d[7:0]; model[{k[AB-1:1], 1'b1}] = d[15:8]; end
        2'b11: for (int i = 0; i < 4; i++) model[{k[AB-1:2], 2'(i)}] = d[8*i +: 8];
        default: ;
      endcase
    end
    en = 0; mc = 0;
  endtask

  function automatic logic [31:0] mword(logic [31:0] ad);
    logic [AB-1:0] k = {ad[AB-1:2], 2'b00};
    return {model[k + 3], model[k + 2], model[k + 1], model[k]};
  endfunction

  task automatic read_check(string what, logic [31:0] ad);
    @(negedge clk);
    en = 1; mc = 2'b00; addr = ad; #1;
    check(what, rdata, mword(ad));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; mc = 0; addr = 0; wdata = 0;
    // clear through the write port
    for (int i = 0; i < 2**AB; i += 4) write(2'b11, i, 0);
    // layout example: byte 5 stored at address 2
    write(2'b01, 2, 32'h5);
    read_check("sb 5 at 2", 0);
    check("sb 5 at 2 lane", rdata, 32'h0005_0000);
    // endianness example: word 0x12345678 at 1000, byte 1000 is 0x78
    write(2'b11, 1000, 32'h1234_5678);
    read_check("word at 1000", 1000);
    check("byte 1000 is 0x78", {24'h0, rdata[7:0]}, 32'h78);
    check("byte 1003 is 0x12", {24'h0, rdata[31:24]}, 32'h12);
    // halfword at 1002
    write(2'b10, 1002, 32'hffff_abcd);
    read_check("half at 1002", 1000);
    check("half at 1002 lane", rdata, 32'habcd_5678);
    // disabled write does nothing
    write(2'b11, 1000, 32'hdead_beef, 1'b0);
    read_check("disabled write", 1000);
    check("disabled write value", rdata, 32'habcd_5678);
    // read needs E and mc = 00
    @(negedge clk); en = 0; mc = 2'b00; addr = 1000; #1;
    check("read with E low", rdata, 0);
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      automatic logic [31:0] ad = $urandom;
      automatic logic [1:0]  c  = 2'($urandom_range(1, 3));
      if (c == 2'b10) ad[0] = 1'b0;             // halfword writes are 2-byte aligned
      if (c == 2'b11) ad[1:0] = 2'b00;          // word writes are 4-byte aligned
      write(c, ad, $urandom);
      read_check("random", $urandom);
      read_check("random same", ad);
    end
    // upper address bits are ignored
    read_check("alias", 32'hffff_f000 | 32'h3c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
