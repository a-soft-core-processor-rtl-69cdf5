// tb_load_align: every size, signedness and byte offset on random words,
// compared with byte and halfword extraction done here (little-endian).
module tb_load_align;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mem_size_e   size;
  logic        sign;
  logic [1:0]  addr;
  logic [31:0] word, data, e;

  load_align dut (.size, .sign, .addr, .word, .data);

  initial begin
    for (int t = 0; t < 200; t++) begin
      word = $urandom;
      for (int s = 0; s < 3; s++) for (int sg = 0; sg < 2; sg++) for (int ad = 0; ad < 4; ad++) begin
        size = mem_size_e'(s); sign = sg[0]; addr = 2'(ad);
        case (s)
          0: begin
            e = (word >> (8 * ad)) & 32'hFF;
            if (sg && e[7]) e |= 32'hFFFF_FF00;
          end
          1: begin
            e = (word >> (16 * (ad / 2))) & 32'hFFFF;
            if (sg && e[15]) e |= 32'hFFFF_0000;
          end
          default: e = word;
        endcase
        #1;
        checks++;
        if (data !== e) begin failures++; $display("FAIL s%0d sg%0d a%0d", s, sg, ad); end
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
