// tb_ecc_accel: drives the accelerator pipeline alone with random streams of
// EXOR/ESLL/ESRL/ELD/EST and main-core instructions (which it must ignore),
// on a few registers so that back-to-back dependences are frequent. The
// testbench plays the main core: it holds the instruction while
// 'ecc_hazard' is high and supplies the line for an ELD in Ma from a table
// indexed by the instruction's offset. An in-order reference model executes
// each instruction as it issues; every EST's data in Ma is compared with it,
// and the stall is compared with "ELD immediately followed by a use of its
// register". All instructions, loads and stores included, must issue one per
// cycle when no stall is due.
module tb_ecc_accel;
  import ecc_pkg::*;
  import tb_asm_pkg::*;
  localparam int W = 294, M = 283, A = 12, B = 7, C = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]  ir;
  logic         ecc_hazard;
  logic [W-1:0] ld_line, st_data;

  ecc_accel dut (.clk, .rst_n, .ir, .id_stall(ecc_hazard), .ecc_hazard, .ld_line, .st_data);

  logic [W-1:0] memv [16];
  logic [W-1:0] regs [32];
  int amt[8] = '{271, 276, 278, 283, 23, 18, 16, 11};

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < 10; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [31:0] rnd_instr();
    logic [4:0] d = 5'($urandom % 5), s = 5'($urandom % 5), t = 5'($urandom % 5);
    case ($urandom % 7)
      0, 1: return e_xor(d, s, t);
      2: return e_sll(d, s, 3'($urandom));
      3: return e_srl(d, s, 3'($urandom));
      4: return e_ld(d, 5'($urandom), 16'($urandom % 16));
      5: return e_st(t, 5'($urandom), 16'd0);
      default: return r_type(FN_XOR, s, t, d);
    endcase
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // model of what sits in Ex and Ma
  logic [31:0]  ex_ir, ma_ir;
  logic [W-1:0] ex_st, ma_st;
  int n_stall = 0, n_st = 0, issued = 0;

  initial begin
    logic [31:0] nxt;
    logic        exp_stall;
    int          cycles;
    for (int i = 0; i < 16; i++) memv[i] = rnd();
    for (int r = 0; r < 32; r++) regs[r] = '0;
    for (int r = 1; r < 32; r++) dut.u_rf.regs[r] = '0;
    ir = NOP; ex_ir = NOP; ma_ir = NOP;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nxt = rnd_instr();
    cycles = 0;
    while (issued < 3000) begin
      ir = nxt;
      ld_line = (ma_ir[31:26] == OP_LWC2) ? memv[ma_ir[3:0]] : rnd();
      #1;
      exp_stall = ex_ir[31:26] == OP_LWC2 && ex_ir[20:16] != 0 &&
                  ((ir[31:26] == OP_COP2 && (ir[25:21] == ex_ir[20:16] ||
                    (ir[5:0] == EFN_XOR && ir[20:16] == ex_ir[20:16]))) ||
                   (ir[31:26] == OP_SWC2 && ir[20:16] == ex_ir[20:16]));
      chk(ecc_hazard == exp_stall, "stall exactly on load-use");
      if (ma_ir[31:26] == OP_SWC2) begin
        chk(st_data == ma_st, "EST data");
        n_st++;
      end
      if (ecc_hazard) n_stall++;
      @(negedge clk);
      cycles++;
      ma_ir = ex_ir; ma_st = ex_st;
      if (exp_stall) ex_ir = NOP;
      else begin
        // reference execution at issue
        logic [4:0] s, t, d;
        s = ir[25:21]; t = ir[20:16]; d = ir[15:11];
        ex_ir = ir;
        ex_st = regs[t];
        case (ir[31:26])
          OP_COP2: begin
            case (ir[5:0])
              EFN_XOR: regs[d] = regs[s] ^ regs[t];
              EFN_SLL: regs[d] = regs[s] << amt[ir[8:6]];
              default: regs[d] = regs[s] >> amt[ir[8:6]];
            endcase
          end
          OP_LWC2: regs[t] = memv[ir[3:0]];
          default: ;
        endcase
        regs[0] = '0;
        issued++;
        nxt = rnd_instr();
      end
    end
    chk(cycles == issued + n_stall, "one instruction per cycle apart from load-use stalls");
    chk(n_stall > 0 && n_st > 100, "stalls and stores exercised");
    // drain: store every register and compare
    for (int r = 0; r < 5; r++) begin
      ir = e_st(5'(r), 5'd0, 16'd0);
      ld_line = rnd();
      #1;
      if (ma_ir[31:26] == OP_SWC2) chk(st_data == ma_st, "EST data");
      @(negedge clk);
      ma_ir = ex_ir; ma_st = ex_st; ex_ir = ir; ex_st = regs[r];
    end
    repeat (2) begin
      ir = NOP; #1;
      if (ma_ir[31:26] == OP_SWC2) chk(st_data == ma_st, "EST data (drain)");
      @(negedge clk);
      ma_ir = ex_ir; ma_st = ex_st; ex_ir = NOP;
    end
    $display("issued %0d stalls %0d stores %0d", issued, n_stall, n_st);
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
