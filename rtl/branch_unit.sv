// branch_unit: resolves branches and jumps in the Id stage of the main core.
// Given the decoded condition/jump kind, the (forwarded) register operands
// and the address of the delay-slot instruction (npc = branch pc + 4), it
// says whether control transfers and to which address. Branch targets are
// npc + (sext(imm) << 2); J/JAL use {npc[31:28], index, 2'b00}; JR/JALR use
// rs. Resolving in Id leaves exactly one delay slot, as the MIPS
// architecture defines. Combinational. The original design places a 'branch' block
// in the Id stage; its insides follow the MIPS architecture.
module branch_unit
  import ecc_pkg::*;
(
  input  br_cond_e    cond,
  input  jump_e       jump,
  input  logic [31:0] ir,
  input  logic [31:0] npc,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] target
);
  logic cond_true;

  always_comb begin
    unique case (cond)
      BR_EQ:   cond_true = (rs_val == rt_val);
      BR_NE:   cond_true = (rs_val != rt_val);
      BR_LEZ:  cond_true = $signed(rs_val) <= 0;
      BR_GTZ:  cond_true = $signed(rs_val) > 0;
      BR_LTZ:  cond_true = rs_val[31];
      BR_GEZ:  cond_true = !rs_val[31];
      default: cond_true = 1'b0;
    endcase
    unique case (jump)
      JMP_ABS: begin taken = 1'b1; target = {npc[31:28], ir[25:0], 2'b00}; end
      JMP_REG: begin taken = 1'b1; target = rs_val; end
      default: begin
        taken  = cond_true;
        target = npc + {{14{ir[15]}}, ir[15:0], 2'b00};
      end
    endcase
  end
endmodule
