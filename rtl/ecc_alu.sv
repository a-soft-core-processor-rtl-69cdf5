// ecc_alu: the accelerator's arithmetic unit for GF(2^m) reduction.
// It offers a W-bit XOR (addition in GF(2)[x], no carries) and logical
// shifts left and right. A shift does not take an arbitrary amount: the
// reduction algorithm for a fixed irreducible polynomial
// f(x) = x^M + x^A + x^B + x^C + 1 on W-bit words needs only the amounts
// (M-k) mod W and W - ((M-k) mod W) for k in {A, B, C, 0}. These eight
// constants are fixed when the design is elaborated, so each shifter is an
// eight-input multiplexer of hard-wired shifts instead of a barrel shifter.
// Purely combinational; the result is registered by the accelerator's Ex/Ma
// register. Which constant each 'sel' value picks is this design's encoding
// (see ecc_pkg).
module ecc_alu
  import ecc_pkg::*;
#(
  parameter int unsigned W = 294,
  parameter int unsigned M = 283,
  parameter int unsigned A = 12,
  parameter int unsigned B = 7,
  parameter int unsigned C = 5
) (
  input  ecc_op_e     op,
  input  logic [2:0]  sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W-1:0] shl [8];
  logic [W-1:0] shr [8];

  for (genvar s = 0; s < 8; s++) begin : g_amt
    localparam int unsigned AMT = shift_amount(W, M, A, B, C, s);
    if (AMT >= W) begin : g_out
      assign shl[s] = '0;
      assign shr[s] = '0;
    end else begin : g_in
      assign shl[s] = a << AMT;
      assign shr[s] = a >> AMT;
    end
  end

  always_comb begin
    unique case (op)
      EOP_SLL: y = shl[sel];
      EOP_SRL: y = shr[sel];
      default: y = a ^ b;
    endcase
  end
endmodule
