// mips_regfile: the main core's 32 x 32-bit general purpose register file.
// Two asynchronous read ports (rs, rt) feed the Id stage; one write port is
// driven from the Wb stage on the rising clock edge. Register 0 always reads
// zero, as in the MIPS architecture. A read of the register being written in
// the same cycle returns the new value (write-through), so the Wb stage needs
// no separate bypass into Id. The write-through and the asynchronous reads
// are this design's choices; the original design only names the block.
module mips_regfile (
  input  logic        clk,
  input  logic [4:0]  ra1,
  output logic [31:0] rd1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [1:32-1];

  always_ff @(posedge clk)
    if (we && wa != 5'd0) regs[wa] <= wd;

  always_comb begin
    rd1 = (ra1 == 5'd0) ? 32'd0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? 32'd0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
