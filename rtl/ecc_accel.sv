// ecc_accel: the variable word size ECC accelerator. It is a second pipeline
// with the same stages as the main core, fed with the same If/Id instruction
// word and held by the same stall ('id_stall'). Its datapath is W bits wide
// throughout: ECC register file, operand multiplexers, ECC ALU (XOR and the
// fixed shifts of the reduction algorithm for f(x) = x^M+x^A+x^B+x^C+1),
// result registers.
//
//   Id  ecc_decoder, ecc_regfile read; an accelerator instruction that uses
//       the destination of an ELD in Ex raises 'ecc_hazard' (one-cycle stall).
//   Ex  ECC ALU with bypasses from the Ex/Ma and Wb results.
//   Ma  EST drives 'st_data' (the main core supplies the address and the
//       write strobe); ELD takes 'ld_line', the low W bits of the data memory
//       line read for it.
//   Wb  ECC register file write.
// All ECC instructions, loads and stores included, issue one per cycle.
// The coupling at the Id and Ma stages and the W-wide datapath follow the
// original design; the encoding, the stall rule and the reset are this design's.
module ecc_accel
  import ecc_pkg::*;
#(
  parameter int unsigned W = 294,
  parameter int unsigned M = 283,
  parameter int unsigned A = 12,
  parameter int unsigned B = 7,
  parameter int unsigned C = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  ir,
  input  logic         id_stall,
  output logic         ecc_hazard,
  input  logic [W-1:0] ld_line,
  output logic [W-1:0] st_data
);
  typedef struct packed {
    ecc_ctrl_t    ctrl;
    logic [4:0]   rs, rt;
    logic [W-1:0] rs_val, rt_val;
  } id_ex_t;

  typedef struct packed {
    logic         reg_we, ld;
    logic [4:0]   dst;
    logic [W-1:0] rslt;
    logic [W-1:0] st_data;
  } ex_ma_t;

  typedef struct packed {
    logic         reg_we;
    logic [4:0]   dst;
    logic [W-1:0] rslt;
  } ma_wb_t;

  id_ex_t idex_q;
  ex_ma_t exma_q;
  ma_wb_t mawb_q;

  // ------------------------------------------------------------------ Id
  ecc_ctrl_t    id_ctrl;
  logic [4:0]   id_rs, id_rt;
  logic [W-1:0] rf_rs, rf_rt;

  assign id_rs = ir[25:21];
  assign id_rt = ir[20:16];

  ecc_decoder u_dec (.ir, .ctrl(id_ctrl));

  ecc_regfile #(.W(W), .NREG(32)) u_rf (
    .clk, .ra1(id_rs), .rd1(rf_rs), .ra2(id_rt), .rd2(rf_rt),
    .we(mawb_q.reg_we), .wa(mawb_q.dst), .wd(mawb_q.rslt)
  );

  assign ecc_hazard = idex_q.ctrl.ld && idex_q.ctrl.reg_we &&
                      ((id_ctrl.use_rs && id_rs == idex_q.ctrl.dst) ||
                       (id_ctrl.use_rt && id_rt == idex_q.ctrl.dst));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) idex_q <= '0;
    else if (id_stall) idex_q <= '0;
    else begin
      idex_q.ctrl   <= id_ctrl;
      idex_q.rs     <= id_rs;
      idex_q.rt     <= id_rt;
      idex_q.rs_val <= rf_rs;
      idex_q.rt_val <= rf_rt;
    end

  // ------------------------------------------------------------------ Ex
  logic [W-1:0] ex_rs, ex_rt, alu_y;

  always_comb begin
    ex_rs = idex_q.rs_val;
    ex_rt = idex_q.rt_val;
    if (mawb_q.reg_we && mawb_q.dst == idex_q.rs) ex_rs = mawb_q.rslt;
    if (mawb_q.reg_we && mawb_q.dst == idex_q.rt) ex_rt = mawb_q.rslt;
    if (exma_q.reg_we && exma_q.dst == idex_q.rs) ex_rs = exma_q.rslt;
    if (exma_q.reg_we && exma_q.dst == idex_q.rt) ex_rt = exma_q.rslt;
  end

  ecc_alu #(.W(W), .M(M), .A(A), .B(B), .C(C)) u_alu (
    .op(idex_q.ctrl.op), .sel(idex_q.ctrl.sel), .a(ex_rs), .b(ex_rt), .y(alu_y)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) exma_q <= '0;
    else begin
      exma_q.reg_we  <= idex_q.ctrl.reg_we;
      exma_q.ld      <= idex_q.ctrl.ld;
      exma_q.dst     <= idex_q.ctrl.dst;
      exma_q.rslt    <= alu_y;
      exma_q.st_data <= ex_rt;
    end

  // ------------------------------------------------------------------ Ma
  assign st_data = exma_q.st_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mawb_q <= '0;
    else begin
      mawb_q.reg_we <= exma_q.reg_we;
      mawb_q.dst    <= exma_q.dst;
      mawb_q.rslt   <= exma_q.ld ? ld_line : exma_q.rslt;
    end
endmodule
