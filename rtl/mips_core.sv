// mips_core: the main core, a five-stage MIPS pipeline (If, Id, Ex, Ma, Wb)
// that runs the program and computes the effective addresses of the
// accelerator's loads and stores.
//
//   If  pc register; the instruction memory registers the fetched word,
//       which is the If/Id instruction register 'i_rdata'.
//   Id  decoder/operand generator, register file read, branch unit. Branches
//       and jumps resolve here, leaving one delay slot. Branch operands are
//       forwarded from the Ex/Ma result; a branch whose operand is still
//       being computed in Ex (or loaded in Ma) stalls.
//   Ex  ALU with operand multiplexers forwarding the Ex/Ma result and the Wb
//       result. Loads present their address to the data memory here.
//   Ma  store data and byte enables go to the data memory; loaded data
//       (already narrowed to its 32-bit lane by the top level) is aligned and
//       extended.
//   Wb  register file write.
//
// Hazards: an instruction in Id that uses the destination of a load in Ex
// stalls one cycle (If and Id hold, a bubble enters Ex). The accelerator adds
// its own stall request 'ecc_hazard'; the combined 'id_stall' goes back to the
// accelerator so both pipelines hold together.
// Data interface: 'd_re'/'d_raddr'/'d_rsize' in Ex, read data 'd_rdata' in Ma;
// 'd_we', 'd_waddr', 'd_wdata', 'd_be', 'd_size' in Ma. For the accelerator's
// ELD/EST the core drives d_re/d_we with d_size = SZ_LINE and the address.
// The stage structure and the bypass paths follow the original design's pipeline
// figure; the instruction subset and the stall policy are this design's own.
module mips_core
  import ecc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic        i_en,
  output logic [31:0] i_addr,
  input  logic [31:0] i_rdata,
  // data memory
  output logic        d_re,
  output logic [31:0] d_raddr,
  output mem_size_e   d_rsize,
  input  logic [31:0] d_rdata,
  output logic        d_we,
  output logic [31:0] d_waddr,
  output logic [31:0] d_wdata,
  output logic [3:0]  d_be,
  output mem_size_e   d_size,
  // coupling with the accelerator
  input  logic        ecc_hazard,
  output logic        id_stall
);
  typedef struct packed {
    mips_ctrl_t  ctrl;
    logic [4:0]  rs, rt;
    logic [31:0] rs_val, rt_val;
    logic [31:0] link;
  } id_ex_t;

  typedef struct packed {
    logic        reg_we;
    logic [4:0]  dst;
    logic        mem_rd, mem_wr, mem_signed;
    mem_size_e   mem_size;
    logic [31:0] rslt;
    logic [31:0] st_data;
  } ex_ma_t;

  typedef struct packed {
    logic        reg_we;
    logic [4:0]  dst;
    logic [31:0] rslt;
  } ma_wb_t;

  logic [31:0] pc_q, npc_q;
  id_ex_t      idex_q;
  ex_ma_t      exma_q;
  ma_wb_t      mawb_q;

  // ------------------------------------------------------------------ If
  logic        br_taken;
  logic [31:0] br_target;

  assign i_en   = !id_stall;
  assign i_addr = pc_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc_q  <= 32'd0;
      npc_q <= 32'd0;
    end else if (!id_stall) begin
      pc_q  <= br_taken ? br_target : pc_q + 32'd4;
      npc_q <= pc_q + 32'd4;
    end

  // ------------------------------------------------------------------ Id
  mips_ctrl_t  id_ctrl;
  logic [4:0]  id_rs, id_rt;
  logic [31:0] rf_rs, rf_rt, id_rs_val, id_rt_val;
  logic        load_use, br_wait, id_is_br;

  assign id_rs = i_rdata[25:21];
  assign id_rt = i_rdata[20:16];

  mips_decoder u_dec (.ir(i_rdata), .ctrl(id_ctrl));

  mips_regfile u_rf (
    .clk, .ra1(id_rs), .rd1(rf_rs), .ra2(id_rt), .rd2(rf_rt),
    .we(mawb_q.reg_we), .wa(mawb_q.dst), .wd(mawb_q.rslt)
  );

  // Ex/Ma result bypass into Id (for branches)
  always_comb begin
    id_rs_val = (exma_q.reg_we && !exma_q.mem_rd && exma_q.dst == id_rs) ? exma_q.rslt : rf_rs;
    id_rt_val = (exma_q.reg_we && !exma_q.mem_rd && exma_q.dst == id_rt) ? exma_q.rslt : rf_rt;
  end

  branch_unit u_br (
    .cond(id_ctrl.br_cond), .jump(id_ctrl.jump), .ir(i_rdata), .npc(npc_q),
    .rs_val(id_rs_val), .rt_val(id_rt_val), .taken(br_taken), .target(br_target)
  );

  function automatic logic uses(input mips_ctrl_t c, input logic [4:0] rs,
                                input logic [4:0] rt, input logic [4:0] r);
    return (r != 5'd0) && ((c.use_rs && rs == r) || (c.use_rt && rt == r));
  endfunction

  assign id_is_br = (id_ctrl.br_cond != BR_NONE) || (id_ctrl.jump == JMP_REG);
  assign load_use = idex_q.ctrl.mem_rd && idex_q.ctrl.reg_we &&
                    uses(id_ctrl, id_rs, id_rt, idex_q.ctrl.dst);
  assign br_wait  = id_is_br &&
                    ((idex_q.ctrl.reg_we && uses(id_ctrl, id_rs, id_rt, idex_q.ctrl.dst)) ||
                     (exma_q.mem_rd && exma_q.reg_we && uses(id_ctrl, id_rs, id_rt, exma_q.dst)));
  assign id_stall = load_use || br_wait || ecc_hazard;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) idex_q <= '0;
    else if (id_stall) idex_q <= '0;   // bubble
    else begin
      idex_q.ctrl   <= id_ctrl;
      idex_q.rs     <= id_rs;
      idex_q.rt     <= id_rt;
      idex_q.rs_val <= rf_rs;
      idex_q.rt_val <= rf_rt;
      idex_q.link   <= npc_q + 32'd4;
    end

  // ------------------------------------------------------------------ Ex
  logic [31:0] ex_rs, ex_rt, alu_a, alu_b, alu_y;

  always_comb begin
    ex_rs = idex_q.rs_val;
    ex_rt = idex_q.rt_val;
    if (mawb_q.reg_we && mawb_q.dst == idex_q.rs) ex_rs = mawb_q.rslt;
    if (mawb_q.reg_we && mawb_q.dst == idex_q.rt) ex_rt = mawb_q.rslt;
    if (exma_q.reg_we && exma_q.dst == idex_q.rs) ex_rs = exma_q.rslt;
    if (exma_q.reg_we && exma_q.dst == idex_q.rt) ex_rt = exma_q.rslt;
    alu_a = (idex_q.ctrl.alu_op == ALU_LINK) ? idex_q.link : ex_rs;
    alu_b = idex_q.ctrl.src_b_imm ? idex_q.ctrl.imm : ex_rt;
  end

  mips_alu u_alu (
    .op(idex_q.ctrl.alu_op), .a(alu_a), .b(alu_b),
    .shamt(idex_q.ctrl.shamt_imm ? idex_q.ctrl.shamt : ex_rs[4:0]), .y(alu_y)
  );

  assign d_re    = idex_q.ctrl.mem_rd;
  assign d_raddr = alu_y;
  assign d_rsize = idex_q.ctrl.mem_size;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) exma_q <= '0;
    else begin
      exma_q.reg_we     <= idex_q.ctrl.reg_we;
      exma_q.dst        <= idex_q.ctrl.dst;
      exma_q.mem_rd     <= idex_q.ctrl.mem_rd;
      exma_q.mem_wr     <= idex_q.ctrl.mem_wr;
      exma_q.mem_signed <= idex_q.ctrl.mem_signed;
      exma_q.mem_size   <= idex_q.ctrl.mem_size;
      exma_q.rslt       <= alu_y;
      exma_q.st_data    <= ex_rt;
    end

  // ------------------------------------------------------------------ Ma
  logic [31:0] ld_data;

  assign d_we    = exma_q.mem_wr;
  assign d_waddr = exma_q.rslt;
  assign d_size  = exma_q.mem_size;

  always_comb begin
    unique case (exma_q.mem_size)
      SZ_B:    begin d_wdata = {4{exma_q.st_data[7:0]}};  d_be = 4'b0001 << exma_q.rslt[1:0]; end
      SZ_H:    begin d_wdata = {2{exma_q.st_data[15:0]}}; d_be = exma_q.rslt[1] ? 4'b1100 : 4'b0011; end
      default: begin d_wdata = exma_q.st_data;            d_be = 4'b1111; end
    endcase
  end

  load_align u_align (
    .size(exma_q.mem_size), .sign(exma_q.mem_signed), .addr(exma_q.rslt[1:0]),
    .word(d_rdata), .data(ld_data)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mawb_q <= '0;
    else begin
      mawb_q.reg_we <= exma_q.reg_we;
      mawb_q.dst    <= exma_q.dst;
      mawb_q.rslt   <= exma_q.mem_rd ? ld_data : exma_q.rslt;
    end
endmodule
