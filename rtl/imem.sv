// imem: instruction memory of the soft core, an on-chip block RAM of WORDS
// 32-bit words. The If stage presents the word address of the pc; with
// 'en' high the addressed word is registered on the rising edge and appears
// on 'rdata' in the next cycle, where it serves as the If/Id instruction
// register. 'en' low (a pipeline stall) holds the output. A synchronous
// reset clears the output register to a no-operation. A separate write
// port loads the program. The memory size, the load port and the BRAM
// timing are this design's choices; the original design only draws the block.
module imem
  import ecc_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk)
    if (rst)     rdata <= NOP;
    else if (en) rdata <= mem[addr];
endmodule
