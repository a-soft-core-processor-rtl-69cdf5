// tb_ecc_soc_random: random programs mixing main-core and accelerator
// instructions on the default build, checked against an instruction-level
// reference model of both register files and of the data memory.
// The mix holds ALU and immediate operations, byte/halfword/word loads and
// stores at random lanes of the wide memory lines, EXOR/ESLL/ESRL, and
// ELD/EST whose line address often comes from a register written by the
// instruction just before (so the address is forwarded). Dependences are
// dense, so main-core and accelerator stalls and bypasses all occur. At the
// end the program stores every register it used; the testbench then
// compares the first 48 memory lines with the model.
module tb_ecc_soc_random;
  import ecc_pkg::*;
  import tb_asm_pkg::*;

  localparam int W = 294, M = 283, A = 12, B = 7, C = 5;
  localparam int WD = 512, LBYTES = WD / 8, WBYTES = (W + 7) / 8;
  localparam int NLINES = 48, DONE = 47 * LBYTES, NPROG = 6, NINSTR = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_soc dut (.clk, .rst_n, .io_in(32'd0), .io_out(), .io_out_valid(), .prog_we, .prog_addr, .prog_wdata);

  // ------------------------------------------------------- reference model
  logic [31:0]   gpr [32];
  logic [W-1:0]  ecc [32];
  logic [WD-1:0] mem [NLINES];
  int amt[8] = '{271, 276, 278, 283, 23, 18, 16, 11};

  function automatic logic [7:0] rd_byte(int a);
    return mem[a / LBYTES][8 * (a % LBYTES) +: 8];
  endfunction

  function automatic void wr_byte(int a, logic [7:0] v);
    mem[a / LBYTES][8 * (a % LBYTES) +: 8] = v;
  endfunction

  function automatic void execute(logic [31:0] ir);
    logic [4:0]  rs = ir[25:21], rt = ir[20:16], rd = ir[15:11];
    logic [31:0] se = {{16{ir[15]}}, ir[15:0]}, ze = {16'd0, ir[15:0]};
    int          ea = int'(gpr[rs] + se);
    case (ir[31:26])
      OP_SPECIAL: case (ir[5:0])
        FN_ADDU: gpr[rd] = gpr[rs] + gpr[rt];
        FN_SUBU: gpr[rd] = gpr[rs] - gpr[rt];
        FN_XOR:  gpr[rd] = gpr[rs] ^ gpr[rt];
        FN_AND:  gpr[rd] = gpr[rs] & gpr[rt];
        FN_OR:   gpr[rd] = gpr[rs] | gpr[rt];
        FN_SLT:  gpr[rd] = (int'(gpr[rs]) < int'(gpr[rt])) ? 1 : 0;
        FN_SLLV: gpr[rd] = gpr[rt] << gpr[rs][4:0];
        FN_SRL:  gpr[rd] = gpr[rt] >> ir[10:6];
        default: ;
      endcase
      OP_ADDIU: gpr[rt] = gpr[rs] + se;
      OP_ORI:   gpr[rt] = gpr[rs] | ze;
      OP_LUI:   gpr[rt] = {ir[15:0], 16'd0};
      OP_LW:    gpr[rt] = {rd_byte(ea + 3), rd_byte(ea + 2), rd_byte(ea + 1), rd_byte(ea)};
      OP_LH:    gpr[rt] = {{16{rd_byte(ea + 1) >= 8'h80}}, rd_byte(ea + 1), rd_byte(ea)};
      OP_LHU:   gpr[rt] = {16'd0, rd_byte(ea + 1), rd_byte(ea)};
      OP_LB:    gpr[rt] = {{24{rd_byte(ea) >= 8'h80}}, rd_byte(ea)};
      OP_LBU:   gpr[rt] = {24'd0, rd_byte(ea)};
      OP_SW:    for (int k = 0; k < 4; k++) wr_byte(ea + k, gpr[rt][8*k +: 8]);
      OP_SH:    for (int k = 0; k < 2; k++) wr_byte(ea + k, gpr[rt][8*k +: 8]);
      OP_SB:    wr_byte(ea, gpr[rt][7:0]);
      OP_COP2: case (ir[5:0])
        EFN_XOR: ecc[rd] = ecc[rs] ^ ecc[rt];
        EFN_SLL: ecc[rd] = ecc[rs] << amt[ir[8:6]];
        default: ecc[rd] = ecc[rs] >> amt[ir[8:6]];
      endcase
      OP_LWC2: ecc[rt] = mem[ea / LBYTES][W-1:0];
      OP_SWC2: for (int k = 0; k < WBYTES; k++)
                 wr_byte((ea / LBYTES) * LBYTES + k, k < W / 8 ? ecc[rt][8*k +: 8]
                                                               : 8'(ecc[rt][W-1:8*(W/8)]));
      default: ;
    endcase
    gpr[0] = '0;
    ecc[0] = '0;
  endfunction

  // ---------------------------------------------------- program generator
  function automatic logic [31:0] rnd_instr(ref prog_t p);
    logic [4:0] d = 5'(1 + $urandom % 7), s = 5'($urandom % 8), t = 5'($urandom % 8);
    logic [4:0] ed = 5'(1 + $urandom % 5), es = 5'($urandom % 6), et = 5'($urandom % 6);
    int line = $urandom % 40, pick = $urandom % 22;
    case (pick)
      0: return r_type(FN_ADDU, s, t, d);
      1: return r_type(FN_SUBU, s, t, d);
      2: return r_type(FN_XOR, s, t, d);
      3: return r_type(FN_SLT, s, t, d);
      4: return r_type(FN_SLLV, s, t, d);
      5: return i_type(OP_ADDIU, s, d, 16'($urandom));
      6: return i_type(OP_LUI, 5'd0, d, 16'($urandom));
      7: return i_type(OP_LW,  5'd0, d, 16'(line * LBYTES + 4 * ($urandom % 16)));
      8: return i_type(OP_LH,  5'd0, d, 16'(line * LBYTES + 2 * ($urandom % 32)));
      9: return i_type(OP_LBU, 5'd0, d, 16'(line * LBYTES + ($urandom % 64)));
      10: return i_type(OP_SW, 5'd0, t, 16'(line * LBYTES + 4 * ($urandom % 16)));
      15: return i_type(OP_SB, 5'd0, t, 16'(line * LBYTES + ($urandom % 64)));
      16, 17: return e_xor(ed, es, et);
      18: return ($urandom % 2) ? e_sll(ed, es, 3'($urandom)) : e_srl(ed, es, 3'($urandom));
      11: return i_type(OP_SH, 5'd0, t, 16'(line * LBYTES + 2 * ($urandom % 32)));
      12: return e_xor(ed, es, et);
      13: return ($urandom % 2) ? e_sll(ed, es, 3'($urandom)) : e_srl(ed, es, 3'($urandom));
      14, 19: begin
        // base in $9 written right before: the address is forwarded
        p.push_back(i_type(OP_ADDIU, 5'd0, 5'd9, 16'(line * LBYTES)));
        return e_ld(ed, 5'd9, 16'd0);
      end
      default: begin
        p.push_back(i_type(OP_ADDIU, 5'd0, 5'd9, 16'(line * LBYTES)));
        return e_st(et, 5'd9, 16'd0);
      end
    endcase
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int n_ecc_stall, n_mips_stall, n_eld, n_est;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ecc.ecc_hazard) n_ecc_stall++;
    if (dut.u_core.load_use) n_mips_stall++;
    if (dut.u_ecc.idex_q.ctrl.ld) n_eld++;
    if (dut.u_ecc.idex_q.ctrl.st) n_est++;
  end

  initial begin
    for (int pr = 0; pr < NPROG; pr++) begin
      prog_t p;
      int cyc, bad;
      logic [WD-1:0] line;
      p.delete();
      for (int r = 0; r < 32; r++) begin gpr[r] = '0; ecc[r] = '0; end
      for (int r = 1; r < 32; r++) begin
        dut.u_core.u_rf.regs[r] = '0;
        dut.u_ecc.u_rf.regs[r] = '0;
      end
      for (int l = 0; l < NLINES; l++) begin
        for (int k = 0; k < WD / 32; k++) line[32*k +: 32] = $urandom;
        mem[l] = line;
        dut.u_dmem.mem[l] = line;
      end
      // random program, then dump the registers and raise the flag
      for (int j = 0; j < NINSTR; j++) begin
        logic [31:0] w;
        w = rnd_instr(p);
        p.push_back(w);
      end
      for (int r = 1; r < 10; r++) p.push_back(i_type(OP_SW, 5'd0, 5'(r), 16'(40 * LBYTES + 4 * r)));
      for (int r = 1; r < 6; r++) p.push_back(e_st(5'(r), 5'd0, 16'((40 + r) * LBYTES)));
      p.push_back(i_type(OP_ADDIU, 5'd0, 5'd10, 16'd1));
      p.push_back(i_type(OP_SW, 5'd0, 5'd10, 16'(DONE)));
      p.push_back(i_type(OP_BEQ, 5'd0, 5'd0, 16'hFFFF));
      p.push_back(NOP);
      foreach (p[j]) execute(p[j]);

      rst_n = 1'b0;
      @(negedge clk);
      foreach (p[j]) begin
        prog_we = 1'b1; prog_addr = 12'(j); prog_wdata = p[j];
        @(negedge clk);
      end
      prog_we = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end
      while (!(dut.m_we && dut.d_waddr == DONE) && cyc < 5000);
      repeat (3) @(negedge clk);
      chk(cyc < 5000, "program finished");
      bad = 0;
      for (int l = 0; l < NLINES; l++) begin
        chk(dut.u_dmem.mem[l] == mem[l], $sformatf("program %0d line %0d", pr, l));
        if (dut.u_dmem.mem[l] != mem[l] && bad++ < 3)
          for (int k = 0; k < LBYTES; k++)
            if (dut.u_dmem.mem[l][8*k +: 8] != mem[l][8*k +: 8])
              $display("  byte %0d: got %h want %h", k, dut.u_dmem.mem[l][8*k +: 8], mem[l][8*k +: 8]);
      end
      $display("program %0d: %0d instructions, %0d cycles", pr, p.size(), cyc);
    end
    chk(n_ecc_stall > 0 && n_mips_stall > 0, "both kinds of stall happened");
    chk(n_eld > 0 && n_est > 0, "accelerator loads and stores happened");
    $display("stalls ecc=%0d mips=%0d eld=%0d est=%0d", n_ecc_stall, n_mips_stall, n_eld, n_est);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
