// tb_mips_alu: random operands through every main-core ALU operation,
// compared with expressions evaluated here.
module tb_mips_alu;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e     op;
  logic [31:0] a, b, y, e;
  logic [4:0]  sh;

  mips_alu dut (.op, .a, .b, .shamt(sh), .y);

  initial begin
    for (int t = 0; t < 300; t++) begin
      a = $urandom; b = $urandom; sh = 5'($urandom);
      if (t % 7 == 0) b = a;
      for (int o = 0; o <= 12; o++) begin
        op = alu_op_e'(o);
        case (op)
          ALU_ADD:  e = a + b;
          ALU_SUB:  e = a - b;
          ALU_AND:  e = a & b;
          ALU_OR:   e = a | b;
          ALU_XOR:  e = a ^ b;
          ALU_NOR:  e = ~(a | b);
          ALU_SLT:  e = (int'(a) < int'(b)) ? 1 : 0;
          ALU_SLTU: e = (a < b) ? 1 : 0;
          ALU_SLL:  e = b << sh;
          ALU_SRL:  e = b >> sh;
          ALU_SRA:  e = (b >> sh) | (b[31] ? ~(32'hFFFF_FFFF >> sh) : 32'd0);
          ALU_LUI:  e = {b[15:0], 16'h0000};
          default:  e = a;
        endcase
        #1;
        checks++;
        if (y !== e) begin failures++; $display("FAIL op %0d a %h b %h: %h vs %h", o, a, b, y, e); end
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
