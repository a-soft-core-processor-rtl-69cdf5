// ecc_decoder: the accelerator's Id-stage decoder and operand generator.
// It watches the same instruction word the main core decodes and recognises
// the accelerator's instructions: the COP2 ALU group (EXOR, ESLL, ESRL, with
// a 3-bit shift-amount selector in ir[8:6]) and the ELD/EST load/store,
// whose effective address the main core computes. For any other instruction
// it produces a bundle with no register write and no memory access.
// Combinational. The encoding is this design's own (see ecc_pkg); the
// original design shows a decoder and an 'operand gen' producing IMM/SHAMT.
module ecc_decoder
  import ecc_pkg::*;
(
  input  logic [31:0] ir,
  output ecc_ctrl_t   ctrl
);
  logic [5:0] opc;

  assign opc = ir[31:26];

  always_comb begin
    ctrl     = '0;
    ctrl.op  = EOP_XOR;
    ctrl.sel = ir[8:6];
    unique case (opc)
      OP_COP2: begin
        unique case (ir[5:0])
          EFN_XOR: begin ctrl.op = EOP_XOR; ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1; ctrl.reg_we = 1'b1; end
          EFN_SLL: begin ctrl.op = EOP_SLL; ctrl.use_rs = 1'b1; ctrl.reg_we = 1'b1; end
          EFN_SRL: begin ctrl.op = EOP_SRL; ctrl.use_rs = 1'b1; ctrl.reg_we = 1'b1; end
          default: ;
        endcase
        ctrl.dst = ir[15:11];
      end
      OP_LWC2: begin
        ctrl.ld     = 1'b1;
        ctrl.reg_we = 1'b1;
        ctrl.dst    = ir[20:16];
      end
      OP_SWC2: begin
        ctrl.st     = 1'b1;
        ctrl.use_rt = 1'b1;
      end
      default: ;
    endcase
    if (ctrl.dst == 5'd0) ctrl.reg_we = 1'b0;
  end
endmodule
