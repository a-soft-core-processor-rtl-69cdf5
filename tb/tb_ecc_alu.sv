// tb_ecc_alu: checks the accelerator ALU. A 32-bit instance for
// f(x) = x^283 + x^12 + x^7 + x^5 + 1 must shift by exactly the amounts of
// the algorithm's table: right 15, 20, 22, 27 and left 17, 12, 10, 5. The
// default 294-bit instance is checked against amounts worked out here from
// (m - k) mod w and w - ((m - k) mod w). XOR is checked on random data.
module tb_ecc_alu;
  import ecc_pkg::*;

  localparam int W1 = 32, W2 = 294;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ecc_op_e       op;
  logic [2:0]    sel;
  logic [W1-1:0] a1, b1, y1;
  logic [W2-1:0] a2, b2, y2;

  ecc_alu #(.W(W1), .M(283), .A(12), .B(7), .C(5)) dut32 (.op, .sel, .a(a1), .b(b1), .y(y1));
  ecc_alu dut294 (.op, .sel, .a(a2), .b(b2), .y(y2));

  int tbl32[8]  = '{15, 20, 22, 27, 17, 12, 10, 5};
  // 283-12=271, 283-7=276, 283-5=278, 283: right amounts below 294
  int tbl294[8] = '{271, 276, 278, 283, 23, 18, 16, 11};

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < 10; k++) begin
        a2[32*k +: 32] = $urandom;
        b2[32*k +: 32] = $urandom;
      end
      a1 = $urandom; b1 = $urandom;
      op = EOP_XOR; sel = 3'($urandom);
      #1;
      chk(y1 == (a1 ^ b1), "xor32");
      chk(y2 == (a2 ^ b2), "xor294");
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        op = EOP_SRL; #1;
        chk(y1 == a1 >> tbl32[s], $sformatf("srl32 sel %0d", s));
        chk(y2 == a2 >> tbl294[s], $sformatf("srl294 sel %0d", s));
        op = EOP_SLL; #1;
        chk(y1 == a1 << tbl32[s], $sformatf("sll32 sel %0d", s));
        chk(y2 == a2 << tbl294[s], $sformatf("sll294 sel %0d", s));
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
