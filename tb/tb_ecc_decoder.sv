// tb_ecc_decoder: accelerator instructions must decode to the right
// operation, shift selector, registers and load/store flags; main-core
// instructions must decode to nothing.
module tb_ecc_decoder;
  import ecc_pkg::*;
  import tb_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] ir;
  ecc_ctrl_t   c;

  ecc_decoder dut (.ir, .ctrl(c));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ir %h)", s, ir); end
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      logic [4:0] d, s, r;
      logic [2:0] sl;
      d = 5'($urandom % 31 + 1); s = 5'($urandom); r = 5'($urandom); sl = 3'($urandom);
      ir = e_xor(d, s, r); #1;
      chk(c.op == EOP_XOR && c.reg_we && c.dst == d && c.use_rs && c.use_rt && !c.ld && !c.st, "exor");
      ir = e_sll(d, s, sl); #1;
      chk(c.op == EOP_SLL && c.sel == sl && c.reg_we && c.dst == d && !c.use_rt, "esll");
      ir = e_srl(d, s, sl); #1;
      chk(c.op == EOP_SRL && c.sel == sl && c.reg_we && c.dst == d, "esrl");
      ir = e_ld(d, s, 16'($urandom)); #1;
      chk(c.ld && c.reg_we && c.dst == d && !c.use_rs && !c.use_rt, "eld");
      ir = e_st(d, s, 16'($urandom)); #1;
      chk(c.st && !c.reg_we && c.use_rt && !c.ld, "est");
      ir = e_xor(5'd0, s, r); #1;
      chk(!c.reg_we, "write to e0 dropped");
      ir = r_type(FN_XOR, s, r, d); #1;
      chk(!c.reg_we && !c.ld && !c.st, "main-core xor ignored");
      ir = i_type(OP_LW, s, r, 16'd0); #1;
      chk(!c.reg_we && !c.ld && !c.st, "main-core lw ignored");
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
