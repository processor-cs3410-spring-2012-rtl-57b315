// regfile: the MIPS register file, 32 registers of 32 bits with r0 wired
// to zero.
//
// Two combinational read ports (ra -> a, rb -> b) and one write port
// (rw, w, we). As in the design, a write happens on the falling edge of
// clk and only when we is high; a write to r0 is dropped and r0 always
// reads as zero. Because the rest of the single-cycle CPU updates on the
// rising edge, the result of an instruction is written half-way through
// its cycle.
//
// Own choices: a synchronous reset (sampled on the same falling edge)
// clears r1..r31; the design does not say how registers start. Reads are
// not bypassed: a value written at a falling edge is seen from then on.
module regfile #(
  parameter int unsigned NREGS = 32,   // registers r0..r31
  parameter int unsigned WIDTH = 32    // bits per register
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,   // WE
  input  logic [$clog2(NREGS)-1:0] rw,   // R_W
  input  logic [WIDTH-1:0]         w,    // W
  input  logic [$clog2(NREGS)-1:0] ra,   // R_A
  input  logic [$clog2(NREGS)-1:0] rb,   // R_B
  output logic [WIDTH-1:0]         a,    // A
  output logic [WIDTH-1:0]         b     // B
);

  logic [WIDTH-1:0] regs [1:NREGS-1];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= w;
    end
  end

  always_comb begin
    a = (ra == '0) ? '0 : regs[ra];
    b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
