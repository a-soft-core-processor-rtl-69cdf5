// mips_decoder: Id-stage decoder and operand generator of the main core.
// From the 32-bit instruction it derives the control bundle carried down the
// pipeline (ALU operation, operand selection, destination register, memory
// access kind, branch/jump kind) and the extended immediate. It decodes the
// MIPS-I integer subset listed in ecc_pkg plus the accelerator's load/store
// (ELD/EST), for which the main core only computes the effective address
// gpr[rs] + sext(imm); the accelerator itself decodes its ALU and register
// fields. Unknown instructions decode as no-operations. Combinational.
// The original design shows 'decoder' and 'operand gen' as blocks of the Id stage;
// the decoded subset and the control encoding are this design's own.
module mips_decoder
  import ecc_pkg::*;
(
  input  logic [31:0] ir,
  output mips_ctrl_t  ctrl
);
  logic [5:0]  opc;
  logic [5:0]  fn;
  logic [4:0]  rt, rd;
  logic [31:0] sext, zext;

  assign opc  = ir[31:26];
  assign fn   = ir[5:0];
  assign rt   = ir[20:16];
  assign rd   = ir[15:11];
  assign sext = {{16{ir[15]}}, ir[15:0]};
  assign zext = {16'd0, ir[15:0]};

  always_comb begin
    ctrl            = '0;
    ctrl.alu_op     = ALU_ADD;
    ctrl.mem_size   = SZ_W;
    ctrl.br_cond    = BR_NONE;
    ctrl.jump       = JMP_NONE;
    ctrl.imm        = sext;
    ctrl.shamt      = ir[10:6];
    unique case (opc)
      OP_SPECIAL: begin
        ctrl.use_rs = 1'b1;
        ctrl.use_rt = 1'b1;
        ctrl.reg_we = 1'b1;
        ctrl.dst    = rd;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.shamt_imm = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.shamt_imm = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.shamt_imm = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_JR:   begin ctrl.jump = JMP_REG; ctrl.reg_we = 1'b0; ctrl.use_rt = 1'b0; end
          FN_JALR: begin ctrl.jump = JMP_REG; ctrl.alu_op = ALU_LINK; ctrl.use_rt = 1'b0; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: begin ctrl.reg_we = 1'b0; ctrl.use_rs = 1'b0; ctrl.use_rt = 1'b0; end
        endcase
        if (rd == 5'd0) ctrl.reg_we = 1'b0;
      end
      OP_REGIMM: begin
        ctrl.use_rs  = 1'b1;
        ctrl.br_cond = rt[0] ? BR_GEZ : BR_LTZ;
      end
      OP_J:   ctrl.jump = JMP_ABS;
      OP_JAL: begin
        ctrl.jump   = JMP_ABS;
        ctrl.alu_op = ALU_LINK;
        ctrl.reg_we = 1'b1;
        ctrl.dst    = 5'd31;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.use_rs  = 1'b1;
        ctrl.use_rt  = 1'b1;
        ctrl.br_cond = (opc == OP_BEQ) ? BR_EQ : BR_NE;
      end
      OP_BLEZ, OP_BGTZ: begin
        ctrl.use_rs  = 1'b1;
        ctrl.br_cond = (opc == OP_BLEZ) ? BR_LEZ : BR_GTZ;
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.use_rs    = (opc != OP_LUI);
        ctrl.src_b_imm = 1'b1;
        ctrl.reg_we    = (rt != 5'd0);
        ctrl.dst       = rt;
        unique case (opc)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; ctrl.imm = zext; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  ctrl.imm = zext; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; ctrl.imm = zext; end
          OP_LUI:   ctrl.alu_op = ALU_LUI;
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.use_rs     = 1'b1;
        ctrl.src_b_imm  = 1'b1;
        ctrl.mem_rd     = 1'b1;
        ctrl.reg_we     = (rt != 5'd0);
        ctrl.dst        = rt;
        ctrl.mem_signed = (opc == OP_LB) || (opc == OP_LH);
        ctrl.mem_size   = (opc == OP_LW) ? SZ_W :
                          (opc == OP_LH || opc == OP_LHU) ? SZ_H : SZ_B;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.use_rs    = 1'b1;
        ctrl.use_rt    = 1'b1;
        ctrl.src_b_imm = 1'b1;
        ctrl.mem_wr    = 1'b1;
        ctrl.mem_size  = (opc == OP_SW) ? SZ_W : (opc == OP_SH) ? SZ_H : SZ_B;
      end
      OP_LWC2, OP_SWC2: begin  // accelerator load/store: address only
        ctrl.use_rs    = 1'b1;
        ctrl.src_b_imm = 1'b1;
        ctrl.mem_rd    = (opc == OP_LWC2);
        ctrl.mem_wr    = (opc == OP_SWC2);
        ctrl.mem_size  = SZ_LINE;
      end
      default: ;
    endcase
  end
endmodule
