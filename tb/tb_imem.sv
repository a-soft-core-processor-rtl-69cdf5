// tb_imem: loads random words, then checks the one-cycle registered read,
// that 'en' low holds the output and that reset clears it to a no-operation.
module tb_imem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int WORDS = 4096;
  logic        rst = 1, en = 0, we = 0;
  logic [11:0] addr = 0, waddr = 0;
  logic [31:0] rdata, wdata = 0;
  logic [31:0] shadow [256];

  imem dut (.clk, .rst, .en, .addr, .rdata, .we, .waddr, .wdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    @(negedge clk);
    chk(rdata == 32'd0, "reset output is a no-op");
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 12'(i * 16); wdata = $urandom; shadow[i] = wdata;
      @(negedge clk);
    end
    we = 0; rst = 0;
    for (int t = 0; t < 300; t++) begin
      logic [31:0] prev;
      int i;
      i = $urandom % 256;
      prev = rdata;
      en = ($urandom % 4) != 0; addr = 12'(i * 16);
      @(negedge clk);
      chk(rdata == (en ? shadow[i] : prev), en ? "registered read" : "hold while disabled");
    end
    rst = 1; @(negedge clk);
    chk(rdata == 32'd0, "reset clears output");
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
