// ecc_pkg: types, instruction encodings and constant functions shared by the
// MIPS main core and the variable word size GF(2^m) reduction accelerator.
//
// The main core executes a MIPS-I integer subset (little-endian, one branch
// delay slot). The accelerator instructions use the MIPS coprocessor-2 opcode
// space; the exact encoding is this design's own choice:
//   ECC ALU  : opcode COP2 (6'h12), rs, rt, rd, sel = ir[8:6], funct
//              funct 0 EXOR  rd = rs ^ rt
//              funct 1 ESLL  rd = rs << SHIFT_AMT[sel]
//              funct 2 ESRL  rd = rs >> SHIFT_AMT[sel]
//   ELD      : opcode LWC2 (6'h32): ecc[rt] = line(gpr[rs] + sext(imm))
//   EST      : opcode SWC2 (6'h3A): line(gpr[rs] + sext(imm)) = ecc[rt]
// The shift amounts are the eight constants of the reduction algorithm for
// f(x) = x^m + x^a + x^b + x^c + 1 on w-bit words:
//   sel 0..3 : right amounts (m-a) mod w, (m-b) mod w, (m-c) mod w, m mod w
//   sel 4..7 : left amounts  w - (each of the above)
// A trinomial x^m + x^a + 1 is given with b = c = 0; its duplicate entries
// then equal the "1" term and are harmless.
package ecc_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00, OP_REGIMM = 6'h01, OP_J     = 6'h02, OP_JAL   = 6'h03,
    OP_BEQ     = 6'h04, OP_BNE    = 6'h05, OP_BLEZ  = 6'h06, OP_BGTZ  = 6'h07,
    OP_ADDI    = 6'h08, OP_ADDIU  = 6'h09, OP_SLTI  = 6'h0A, OP_SLTIU = 6'h0B,
    OP_ANDI    = 6'h0C, OP_ORI    = 6'h0D, OP_XORI  = 6'h0E, OP_LUI   = 6'h0F,
    OP_COP2    = 6'h12,
    OP_LB      = 6'h20, OP_LH     = 6'h21, OP_LW    = 6'h23, OP_LBU   = 6'h24,
    OP_LHU     = 6'h25, OP_SB     = 6'h28, OP_SH    = 6'h29, OP_SW    = 6'h2B,
    OP_LWC2    = 6'h32, OP_SWC2   = 6'h3A
  } opcode_e;

  typedef enum logic [5:0] {
    FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03, FN_SLLV = 6'h04,
    FN_SRLV = 6'h06, FN_SRAV = 6'h07, FN_JR   = 6'h08, FN_JALR = 6'h09,
    FN_ADD  = 6'h20, FN_ADDU = 6'h21, FN_SUB  = 6'h22, FN_SUBU = 6'h23,
    FN_AND  = 6'h24, FN_OR   = 6'h25, FN_XOR  = 6'h26, FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A, FN_SLTU = 6'h2B
  } funct_e;

  // ECC ALU function codes (funct field of a COP2 instruction)
  typedef enum logic [5:0] {
    EFN_XOR = 6'h00, EFN_SLL = 6'h01, EFN_SRL = 6'h02
  } ecc_funct_e;

  // ------------------------------------------------------------ main core
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_LINK
  } alu_op_e;

  typedef enum logic [1:0] { SZ_B, SZ_H, SZ_W, SZ_LINE } mem_size_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } br_cond_e;

  typedef enum logic [1:0] { JMP_NONE, JMP_ABS, JMP_REG } jump_e;

  // decoded main-core instruction (the "decoder" and "operand gen" blocks)
  typedef struct packed {
    alu_op_e     alu_op;
    logic        src_b_imm;   // ALU operand B is the immediate
    logic        shamt_imm;   // shift amount from ir[10:6] instead of rs
    logic [31:0] imm;         // extended immediate
    logic [4:0]  shamt;
    logic        use_rs;      // reads GPR rs
    logic        use_rt;      // reads GPR rt
    logic        reg_we;      // writes GPR dst
    logic [4:0]  dst;
    logic        mem_rd;
    logic        mem_wr;
    mem_size_e   mem_size;
    logic        mem_signed;
    br_cond_e    br_cond;
    jump_e       jump;
  } mips_ctrl_t;

  // --------------------------------------------------------- accelerator
  typedef enum logic [1:0] { EOP_XOR, EOP_SLL, EOP_SRL } ecc_op_e;

  typedef struct packed {
    ecc_op_e    op;
    logic [2:0] sel;      // shift amount selector
    logic       use_rs;
    logic       use_rt;
    logic       reg_we;
    logic [4:0] dst;
    logic       ld;       // ELD
    logic       st;       // EST
  } ecc_ctrl_t;

  // memory data width for an ECC word size w: max(2^ceil(log2 w), 32)
  function automatic int unsigned mem_width(int unsigned w);
    int unsigned p = 1;
    while (p < w) p = p * 2;
    return (p < 32) ? 32 : p;
  endfunction

  // the eight shift amounts of Table-2 form (see header)
  function automatic int unsigned shift_amount(int unsigned w, int unsigned m,
                                               int unsigned a, int unsigned b,
                                               int unsigned c, int unsigned sel);
    int unsigned k;
    int unsigned r;
    case (sel % 4)
      0: k = a;
      1: k = b;
      2: k = c;
      default: k = 0;
    endcase
    r = (m - k) % w;
    return (sel < 4) ? r : (w - r);
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0000;

endpackage
