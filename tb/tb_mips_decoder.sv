// tb_mips_decoder: a table of instructions with the control fields each
// must produce (operation, operand sources, destination, memory access,
// branch kind, immediate extension), then random register numbers and
// immediates on every I-type and R-type ALU instruction, checking the
// generic field rules: destination rt or rd, zero- or sign-extension,
// shift amount, and no register write to r0.
module tb_mips_decoder;
  import ecc_pkg::*;
  import tb_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] ir;
  mips_ctrl_t  c;

  mips_decoder dut (.ir, .ctrl(c));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ir %h)", s, ir); end
  endtask

  initial begin
    ir = r_type(FN_ADDU, 5'd1, 5'd2, 5'd3); #1;
    chk(c.alu_op == ALU_ADD && c.reg_we && c.dst == 3 && c.use_rs && c.use_rt && !c.src_b_imm, "addu");
    ir = r_type(FN_SUBU, 5'd1, 5'd2, 5'd0); #1;
    chk(c.alu_op == ALU_SUB && !c.reg_we, "subu to r0 writes nothing");
    ir = r_type(FN_SRA, 5'd0, 5'd2, 5'd4, 5'd7); #1;
    chk(c.alu_op == ALU_SRA && c.shamt_imm && c.shamt == 7 && !c.use_rs && c.use_rt, "sra");
    ir = r_type(FN_SLLV, 5'd5, 5'd2, 5'd4); #1;
    chk(c.alu_op == ALU_SLL && !c.shamt_imm && c.use_rs, "sllv");
    ir = r_type(FN_SLT, 5'd5, 5'd2, 5'd4); #1;
    chk(c.alu_op == ALU_SLT, "slt");
    ir = r_type(FN_NOR, 5'd5, 5'd2, 5'd4); #1;
    chk(c.alu_op == ALU_NOR, "nor");
    ir = r_type(FN_JR, 5'd31, 5'd0, 5'd0); #1;
    chk(c.jump == JMP_REG && !c.reg_we && c.use_rs, "jr");
    ir = r_type(FN_JALR, 5'd9, 5'd0, 5'd31); #1;
    chk(c.jump == JMP_REG && c.reg_we && c.dst == 31 && c.alu_op == ALU_LINK, "jalr");
    ir = i_type(OP_ADDIU, 5'd1, 5'd7, 16'hFFF0); #1;
    chk(c.alu_op == ALU_ADD && c.src_b_imm && c.imm == 32'hFFFF_FFF0 && c.dst == 7 && c.reg_we, "addiu sext");
    ir = i_type(OP_ORI, 5'd1, 5'd7, 16'hFFF0); #1;
    chk(c.alu_op == ALU_OR && c.imm == 32'h0000_FFF0, "ori zext");
    ir = i_type(OP_ANDI, 5'd1, 5'd7, 16'h8001); #1;
    chk(c.alu_op == ALU_AND && c.imm == 32'h0000_8001, "andi zext");
    ir = i_type(OP_SLTIU, 5'd1, 5'd7, 16'h8001); #1;
    chk(c.alu_op == ALU_SLTU && c.imm == 32'hFFFF_8001, "sltiu");
    ir = i_type(OP_LUI, 5'd0, 5'd8, 16'h1234); #1;
    chk(c.alu_op == ALU_LUI && !c.use_rs && c.dst == 8, "lui");
    ir = i_type(OP_LB, 5'd3, 5'd8, 16'd4); #1;
    chk(c.mem_rd && c.mem_size == SZ_B && c.mem_signed && c.reg_we && c.dst == 8, "lb");
    ir = i_type(OP_LHU, 5'd3, 5'd8, 16'd4); #1;
    chk(c.mem_rd && c.mem_size == SZ_H && !c.mem_signed, "lhu");
    ir = i_type(OP_LW, 5'd3, 5'd8, 16'd4); #1;
    chk(c.mem_rd && c.mem_size == SZ_W, "lw");
    ir = i_type(OP_SH, 5'd3, 5'd8, 16'd4); #1;
    chk(c.mem_wr && c.mem_size == SZ_H && !c.reg_we && c.use_rt, "sh");
    ir = i_type(OP_SW, 5'd3, 5'd8, 16'd4); #1;
    chk(c.mem_wr && c.mem_size == SZ_W, "sw");
    ir = e_ld(5'd4, 5'd3, 16'd64); #1;
    chk(c.mem_rd && c.mem_size == SZ_LINE && !c.reg_we && c.use_rs && c.imm == 64, "eld address");
    ir = e_st(5'd4, 5'd3, 16'd64); #1;
    chk(c.mem_wr && c.mem_size == SZ_LINE && !c.use_rt, "est address");
    ir = e_xor(5'd1, 5'd2, 5'd3); #1;
    chk(!c.reg_we && !c.mem_rd && !c.mem_wr && c.br_cond == BR_NONE, "ecc alu op is a no-op here");
    ir = i_type(OP_BEQ, 5'd1, 5'd2, 16'd3); #1;
    chk(c.br_cond == BR_EQ && c.use_rs && c.use_rt && !c.reg_we, "beq");
    ir = i_type(OP_BNE, 5'd1, 5'd2, 16'd3); #1;
    chk(c.br_cond == BR_NE, "bne");
    ir = i_type(OP_BLEZ, 5'd1, 5'd0, 16'd3); #1;
    chk(c.br_cond == BR_LEZ && !c.use_rt, "blez");
    ir = i_type(OP_BGTZ, 5'd1, 5'd0, 16'd3); #1;
    chk(c.br_cond == BR_GTZ, "bgtz");
    ir = i_type(OP_REGIMM, 5'd1, 5'd0, 16'd3); #1;
    chk(c.br_cond == BR_LTZ, "bltz");
    ir = i_type(OP_REGIMM, 5'd1, 5'd1, 16'd3); #1;
    chk(c.br_cond == BR_GEZ, "bgez");
    ir = j_type(OP_JAL, 26'h12345); #1;
    chk(c.jump == JMP_ABS && c.reg_we && c.dst == 31 && c.alu_op == ALU_LINK, "jal");
    ir = j_type(OP_J, 26'h12345); #1;
    chk(c.jump == JMP_ABS && !c.reg_we, "j");
    ir = NOP; #1;
    chk(!c.reg_we && !c.mem_rd && !c.mem_wr, "nop");

    for (int n = 0; n < 600; n++) begin
      opcode_e iops[9];
      funct_e  rops[8];
      logic [4:0]  rs, rt, rd, sh;
      logic [15:0] imm;
      bit          zext;
      iops = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LW, OP_LBU};
      rops = '{FN_ADD, FN_ADDU, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLT, FN_SRL};
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom); sh = 5'($urandom);
      imm = 16'($urandom);
      if (n % 2 == 0) begin
        ir = i_type(iops[n / 2 % 9], rs, rt, imm); #1;
        zext = iops[n / 2 % 9] inside {OP_ANDI, OP_ORI, OP_XORI};
        chk(c.imm == (zext ? {16'd0, imm} : {{16{imm[15]}}, imm}), "random I-type immediate");
        chk(c.dst == rt && c.reg_we == (rt != 0) && c.use_rs && c.src_b_imm, "random I-type fields");
      end else begin
        ir = r_type(rops[n / 2 % 8], rs, rt, rd, sh); #1;
        chk(c.dst == rd && c.reg_we == (rd != 0) && c.use_rt && !c.src_b_imm, "random R-type fields");
        if (rops[n / 2 % 8] == FN_SRL) chk(c.shamt_imm && c.shamt == sh, "random SRL amount");
        else chk(c.use_rs && !c.mem_rd && !c.mem_wr, "random R-type operands");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
