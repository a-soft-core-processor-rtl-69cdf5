// tb_branch_unit: every branch condition and jump kind on random and
// edge-case operands; taken flag and target compared with values computed
// here from the instruction fields and the delay-slot address.
module tb_branch_unit;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  br_cond_e    cond;
  jump_e       jump;
  logic [31:0] ir, npc, rs_val, rt_val, target, e_tgt;
  logic        taken, e_tk;

  branch_unit dut (.cond, .jump, .ir, .npc, .rs_val, .rt_val, .taken, .target);

  initial begin
    int vals[6] = '{0, 1, -1, 32'h7FFF_FFFF, 32'h8000_0000, 5};
    for (int t = 0; t < 300; t++) begin
      ir = $urandom; npc = $urandom & 32'hFFFF_FFFC;
      rs_val = (t % 3 == 0) ? vals[$urandom % 6] : $urandom;
      rt_val = (t % 4 == 0) ? rs_val : $urandom;
      for (int c = 0; c <= 6; c++) begin
        cond = br_cond_e'(c); jump = JMP_NONE;
        case (c)
          1: e_tk = rs_val == rt_val;
          2: e_tk = rs_val != rt_val;
          3: e_tk = int'(rs_val) <= 0;
          4: e_tk = int'(rs_val) > 0;
          5: e_tk = int'(rs_val) < 0;
          6: e_tk = int'(rs_val) >= 0;
          default: e_tk = 0;
        endcase
        e_tgt = npc + 4 * {{16{ir[15]}}, ir[15:0]};
        #1;
        checks++;
        if (taken !== e_tk || (e_tk && target !== e_tgt)) begin
          failures++; $display("FAIL cond %0d", c);
        end
      end
      cond = BR_NONE; jump = JMP_ABS; #1;
      checks++;
      if (!taken || target !== ((npc & 32'hF000_0000) | ((ir & 32'h03FF_FFFF) * 4))) begin
        failures++; $display("FAIL j");
      end
      jump = JMP_REG; #1;
      checks++;
      if (!taken || target !== rs_val) begin failures++; $display("FAIL jr"); end
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
