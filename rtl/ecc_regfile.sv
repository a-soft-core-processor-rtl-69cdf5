// ecc_regfile: the accelerator's register file, NREG registers of the
// configured ECC word size W (32 registers of W bits in the original design).
// Register 0 always reads zero. Two asynchronous read ports serve the Id
// stage; the single write port is written at the end of the Wb stage, with
// write-through to the read ports in the same cycle. W is fixed at synthesis
// time, as in the original design; port timing is this design's own choice.
module ecc_regfile #(
  parameter int unsigned W    = 294,
  parameter int unsigned NREG = 32
) (
  input  logic                    clk,
  input  logic [$clog2(NREG)-1:0] ra1,
  output logic [W-1:0]            rd1,
  input  logic [$clog2(NREG)-1:0] ra2,
  output logic [W-1:0]            rd2,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [W-1:0]            wd
);
  logic [W-1:0] regs [1:NREG-1];

  always_ff @(posedge clk)
    if (we && wa != '0) regs[wa] <= wd;

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
