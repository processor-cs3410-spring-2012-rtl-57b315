// tb_load_extend: test of the load extender. For random words and every
// byte offset, LB/LBU/LH/LHU/LW results are compared with values rebuilt
// from the word's bytes in little-endian order; the byte-layout examples
// (byte 5 stored at address 2, bytes of word 5 at 8..11) are included.
module tb_load_extend;
  import mips_pkg::*;
  logic [31:0] word, y;
  logic [1:0]  addr_lo;
  load_size_e  size;
  logic        signed_ld;
  int checks = 0, failures = 0;

  load_extend dut (.word, .addr_lo, .size, .signed_ld, .y);

  task automatic try(logic [31:0] w, logic [1:0] lo, load_size_e sz, logic sg, logic [31:0] e);
    word = w; addr_lo = lo; size = sz; signed_ld = sg; #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL w=%h lo=%0d size=%s signed=%b: got %h expected %h", w, lo, sz.name(), sg, y, e);
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
    // byte 5 at address 2: lb from address 2 gives 5
    try(32'h0005_0000, 2'd2, LD_BYTE, 1'b1, 32'h5);
    // word 5 at address 8: lb from 8 gives 5, from 11 gives 0
    try(32'h0000_0005, 2'd0, LD_BYTE, 1'b1, 32'h5);
    try(32'h0000_0005, 2'd3, LD_BYTE, 1'b1, 32'h0);
    for (int n = 0; n < 500; n++) begin
      automatic logic [31:0] w = $urandom;
      automatic logic [7:0]  bt [4] = '{w[7:0], w[15:8], w[23:16], w[31:24]};
      for (int lo = 0; lo < 4; lo++) begin
        automatic logic [7:0]  bb = bt[lo];
        automatic logic [15:0] hh = {bt[(lo & 2) + 1], bt[lo & 2]};
        try(w, 2'(lo), LD_BYTE, 1'b1, 32'(signed'(bb)));
        try(w, 2'(lo), LD_BYTE, 1'b0, {24'h0, bb});
        try(w, 2'(lo), LD_HALF, 1'b1, 32'(signed'(hh)));
        try(w, 2'(lo), LD_HALF, 1'b0, {16'h0, hh});
        try(w, 2'(lo), LD_WORD, 1'b0, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
