// tb_mips_core: runs a small program on the main core, with the instruction
// memory and a 32-bit behavioural data memory (read address in Ex, data in
// Ma). The program exercises ALU forwarding from Ma and Wb, a load-use stall,
// a loop whose branch waits for its operand, branch delay slots, JAL/JR,
// byte and halfword loads and stores, and shifts/compares. Results are
// stored to memory and compared with values worked out by hand. The stall
// and forwarding mechanisms are counted and must each occur.
// A second phase runs random straight-line programs of ALU, immediate, load
// and store instructions on eight registers, so nearly every instruction
// depends on one of the three before it. An instruction-level model
// predicts the memory and the final registers, which the program stores.
module tb_mips_core;
  import ecc_pkg::*;
  import tb_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        i_en, d_re, d_we, id_stall;
  logic [31:0] i_addr, i_rdata, d_raddr, d_rdata, d_waddr, d_wdata;
  logic [3:0]  d_be;
  mem_size_e   d_size, d_rsize;
  logic        prog_we = 0;
  logic [11:0] prog_addr = 0;
  logic [31:0] prog_wdata = 0;
  logic [31:0] dm [64];

  mips_core dut (.clk, .rst_n, .i_en, .i_addr, .i_rdata, .d_re, .d_raddr, .d_rsize,
                 .d_rdata, .d_we, .d_waddr, .d_wdata, .d_be, .d_size,
                 .ecc_hazard(1'b0), .id_stall);
  imem u_imem (.clk, .rst(!rst_n), .en(i_en), .addr(i_addr[13:2]), .rdata(i_rdata),
               .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata));

  // behavioural data memory: write in Ma, read addressed in Ex, write-first
  always_ff @(posedge clk) begin
    logic [31:0] w;
    w = dm[d_waddr[7:2]];
    for (int b = 0; b < 4; b++) if (d_be[b]) w[8*b +: 8] = d_wdata[8*b +: 8];
    if (d_we) dm[d_waddr[7:2]] <= w;
    if (d_re) d_rdata <= (d_we && d_waddr[7:2] == d_raddr[7:2]) ? w : dm[d_raddr[7:2]];
  end

  int n_load_use = 0, n_br_wait = 0, n_fwd_ma = 0, n_fwd_wb = 0, n_taken = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.load_use) n_load_use++;
    if (dut.br_wait) n_br_wait++;
    if (dut.idex_q.ctrl.use_rs && dut.exma_q.reg_we && dut.exma_q.dst == dut.idex_q.rs) n_fwd_ma++;
    if (dut.idex_q.ctrl.use_rs && dut.mawb_q.reg_we && dut.mawb_q.dst == dut.idex_q.rs &&
        !(dut.exma_q.reg_we && dut.exma_q.dst == dut.idex_q.rs)) n_fwd_wb++;
    if (!id_stall && dut.br_taken) n_taken++;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  prog_t p;
  function automatic void I(logic [31:0] w); p.push_back(w); endfunction

  // instruction-level model for the random phase
  logic [31:0] gpr [32];
  logic [31:0] mdl [64];

  function automatic void model(logic [31:0] ir);
    logic [4:0]  rs = ir[25:21], rt = ir[20:16], rd = ir[15:11], sa = ir[10:6];
    logic [31:0] a = gpr[rs], b = gpr[rt], se = {{16{ir[15]}}, ir[15:0]}, ze = {16'd0, ir[15:0]};
    case (ir[31:26])
      OP_SPECIAL: case (ir[5:0])
        FN_ADDU: gpr[rd] = a + b;
        FN_SUBU: gpr[rd] = a - b;
        FN_AND:  gpr[rd] = a & b;
        FN_OR:   gpr[rd] = a | b;
        FN_XOR:  gpr[rd] = a ^ b;
        FN_NOR:  gpr[rd] = ~(a | b);
        FN_SLT:  gpr[rd] = 32'($signed(a) < $signed(b));
        FN_SLTU: gpr[rd] = 32'(a < b);
        FN_SLL:  gpr[rd] = b << sa;
        FN_SRL:  gpr[rd] = b >> sa;
        FN_SRA:  gpr[rd] = $signed(b) >>> sa;
        FN_SLLV: gpr[rd] = b << a[4:0];
        FN_SRLV: gpr[rd] = b >> a[4:0];
        default: gpr[rd] = $signed(b) >>> a[4:0];
      endcase
      OP_ADDIU: gpr[rt] = a + se;
      OP_SLTI:  gpr[rt] = 32'($signed(a) < $signed(se));
      OP_SLTIU: gpr[rt] = 32'(a < se);
      OP_ANDI:  gpr[rt] = a & ze;
      OP_ORI:   gpr[rt] = a | ze;
      OP_XORI:  gpr[rt] = a ^ ze;
      OP_LUI:   gpr[rt] = {ir[15:0], 16'd0};
      OP_LW:    gpr[rt] = mdl[(a + se) >> 2];
      OP_SW:    mdl[(a + se) >> 2] = b;
      default: ;
    endcase
    gpr[0] = '0;
  endfunction

  function automatic logic [31:0] rnd_instr();
    logic [4:0] d = 5'(1 + $urandom % 8), s = 5'($urandom % 9), t = 5'($urandom % 9);
    funct_e  fns[14] = '{FN_ADDU, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR, FN_SLT, FN_SLTU,
                         FN_SLL, FN_SRL, FN_SRA, FN_SLLV, FN_SRLV, FN_SRAV};
    opcode_e ops[7] = '{OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI};
    int pick = $urandom % 10;
    if (pick < 5) return r_type(fns[$urandom % 14], s, t, d, 5'($urandom));
    if (pick < 8) return i_type(ops[$urandom % 7], s, d, 16'($urandom));
    if (pick < 9) return i_type(OP_LW, 5'd0, d, 16'(4 * ($urandom % 32)));
    return i_type(OP_SW, 5'd0, t, 16'(4 * ($urandom % 32)));
  endfunction

  initial begin
    int cyc;
    I(i_type(OP_ADDIU, 0, 1, 5));            // 0  $1 = 5
    I(i_type(OP_ADDIU, 0, 2, 7));            // 1  $2 = 7
    I(r_type(FN_ADDU, 1, 2, 3));             // 2  $3 = 12 (bypass Ma, Wb)
    I(i_type(OP_SW, 0, 3, 0));               // 3  [0] = 12
    I(i_type(OP_LW, 0, 4, 0));               // 4  $4 = 12
    I(r_type(FN_ADDU, 4, 4, 5));             // 5  $5 = 24 (load-use)
    I(i_type(OP_SW, 0, 5, 4));               // 6  [4] = 24
    I(i_type(OP_ADDIU, 0, 6, 0));            // 7  sum = 0
    I(i_type(OP_ADDIU, 0, 7, 10));           // 8  i = 10
    I(i_type(OP_ADDIU, 0, 8, 0));            // 9  delay-slot counter
    I(r_type(FN_ADDU, 6, 7, 6));             // 10 loop: sum += i
    I(i_type(OP_ADDIU, 7, 7, 16'hFFFF));     // 11 i--
    I(i_type(OP_BNE, 7, 0, 16'hFFFD));       // 12 -> 10
    I(i_type(OP_ADDIU, 8, 8, 1));            // 13 delay slot
    I(i_type(OP_SW, 0, 6, 8));               // 14 [8] = 55
    I(i_type(OP_SW, 0, 8, 12));              // 15 [12] = 10
    I(j_type(OP_JAL, 26'd24));               // 16 call 24
    I(i_type(OP_ADDIU, 0, 9, 3));            // 17 delay slot: $9 = 3
    I(i_type(OP_SW, 0, 10, 16));             // 18 [16] = 103
    I(i_type(OP_SW, 0, 31, 20));             // 19 [20] = 72
    I(j_type(OP_J, 26'd28));                 // 20
    I(i_type(OP_ADDIU, 0, 11, 16'h1234));    // 21 delay slot
    I(i_type(OP_ADDIU, 0, 12, 1));           // 22 skipped
    I(i_type(OP_ADDIU, 0, 12, 1));           // 23 skipped
    I(r_type(FN_JR, 31, 0, 0));              // 24 func: return
    I(i_type(OP_ADDIU, 9, 10, 100));         // 25 delay slot: $10 = 103
    I(i_type(OP_ADDIU, 0, 12, 2));           // 26 skipped
    I(NOP);                                  // 27
    I(i_type(OP_LUI, 0, 13, 16'h80F1));      // 28
    I(i_type(OP_ORI, 13, 13, 16'h7F82));     // 29 $13 = 80F17F82
    I(i_type(OP_SW, 0, 13, 24));             // 30 [24] = 80F17F82
    I(i_type(OP_LB, 0, 14, 24));             // 31 $14 = FFFFFF82
    I(i_type(OP_LBU, 0, 15, 25));            // 32 $15 = 7F
    I(i_type(OP_LH, 0, 16, 26));             // 33 $16 = FFFF80F1
    I(i_type(OP_SB, 0, 15, 29));             // 34 [28] byte1 = 7F
    I(i_type(OP_SH, 0, 16, 30));             // 35 [28] half1 = 80F1
    I(i_type(OP_SW, 0, 14, 32));             // 36 [32] = FFFFFF82
    I(r_type(FN_SRA, 0, 13, 17, 4));         // 37 $17 = F80F17F8
    I(r_type(FN_SLT, 13, 0, 18));            // 38 $18 = 1 (negative < 0)
    I(r_type(FN_SLTU, 13, 0, 19));           // 39 $19 = 0
    I(r_type(FN_NOR, 0, 0, 20));             // 40 $20 = FFFFFFFF
    I(r_type(FN_SUBU, 20, 17, 21));          // 41 $21 = ~$17 ^ ... = FFFFFFFF - F80F17F8
    I(i_type(OP_SW, 0, 17, 36));             // 42
    I(i_type(OP_SW, 0, 18, 40));             // 43
    I(i_type(OP_SW, 0, 19, 44));             // 44
    I(i_type(OP_SW, 0, 21, 48));             // 45
    I(i_type(OP_SW, 0, 11, 52));             // 46
    I(i_type(OP_SW, 0, 12, 56));             // 47 $12 must still be 0
    I(i_type(OP_BLEZ, 13, 0, 16'd2));        // 48 taken ($13 < 0) -> 51
    I(NOP);                                  // 49
    I(i_type(OP_SW, 0, 20, 56));             // 50 skipped
    I(i_type(OP_ADDIU, 0, 22, 1));           // 51
    I(i_type(OP_SW, 0, 22, 60));             // 52 done flag
    I(i_type(OP_BEQ, 0, 0, 16'hFFFF));       // 53 spin
    I(NOP);

    for (int j = 0; j < 64; j++) dm[j] = 32'd0;
    for (int r = 1; r < 32; r++) dut.u_rf.regs[r] = 32'd0;
    @(negedge clk);
    foreach (p[j]) begin
      prog_we = 1; prog_addr = 12'(j); prog_wdata = p[j];
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (dm[15] != 1 && cyc < 2000) begin @(negedge clk); cyc++; end
    chk(cyc < 2000, "program finished");
    chk(dm[0] == 12, "forwarded add");
    chk(dm[1] == 24, "load-use");
    chk(dm[2] == 55, "loop sum");
    chk(dm[3] == 10, "delay slot executed each iteration");
    chk(dm[4] == 103, "jal/jr with delay slots");
    chk(dm[5] == 72, "link address");
    chk(dm[6] == 32'h80F17F82, "lui/ori");
    chk(dm[7] == 32'h80F17F00, "sb/sh lanes");
    chk(dm[8] == 32'hFFFFFF82, "lb sign extension");
    chk(dm[9] == 32'hF80F17F8, "sra");
    chk(dm[10] == 1, "slt");
    chk(dm[11] == 0, "sltu");
    chk(dm[12] == 32'hFFFFFFFF - 32'hF80F17F8, "nor/subu");
    chk(dm[13] == 32'h1234, "j delay slot");
    chk(dm[14] == 0, "skipped instructions did not execute");
    chk(n_load_use > 0, "load-use stall happened");
    chk(n_br_wait > 0, "branch operand stall happened");
    chk(n_fwd_ma > 0 && n_fwd_wb > 0, "both bypasses used");
    chk(n_taken > 0, "branches taken");

    // random phase
    for (int run = 0; run < 8; run++) begin
      p.delete();
      for (int j = 0; j < 300; j++) I(rnd_instr());
      for (int r = 1; r < 9; r++) I(i_type(OP_SW, 0, 5'(r), 16'(4 * (40 + r))));
      I(i_type(OP_ADDIU, 0, 22, 1));
      I(i_type(OP_SW, 0, 22, 16'(4 * 63)));
      I(i_type(OP_BEQ, 0, 0, 16'hFFFF));
      I(NOP);
      rst_n = 0;
      for (int j = 0; j < 64; j++) begin
        dm[j] = (j < 32) ? $urandom : 32'd0;
        mdl[j] = dm[j];
      end
      for (int r = 0; r < 32; r++) begin
        gpr[r] = '0;
        if (r > 0) dut.u_rf.regs[r] = 32'd0;
      end
      foreach (p[j]) model(p[j]);
      @(negedge clk);
      foreach (p[j]) begin
        prog_we = 1; prog_addr = 12'(j); prog_wdata = p[j];
        @(negedge clk);
      end
      prog_we = 0;
      @(negedge clk) rst_n = 1;
      cyc = 0;
      while (dm[63] != 1 && cyc < 2000) begin @(negedge clk); cyc++; end
      chk(cyc < 2000, "random program finished");
      for (int j = 0; j < 64; j++)
        chk(dm[j] == mdl[j], $sformatf("run %0d word %0d: %h expected %h", run, j, dm[j], mdl[j]));
    end

    $display("cycles %0d load_use %0d br_wait %0d fwd_ma %0d fwd_wb %0d", cyc, n_load_use, n_br_wait, n_fwd_ma, n_fwd_wb);
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
