// mips_alu: the main core's 32-bit integer ALU (Ex stage). Operations: add,
// subtract, and/or/xor/nor, signed and unsigned set-less-than, logical and
// arithmetic shifts by 'shamt', load-upper-immediate, and a pass of operand A
// used for the link address of JAL/JALR. Overflow traps of ADD/SUB are not
// implemented (they behave as ADDU/SUBU). Combinational. The operation set
// follows the MIPS architecture; the original design only names the block.
module mips_alu
  import ecc_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'd0};
      ALU_LINK: y = a;
      default:  y = a + b;
    endcase
  end
endmodule
