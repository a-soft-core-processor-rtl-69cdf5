// tb_dmem: random byte-enabled writes and reads of the 512-bit data memory
// against a shadow copy; includes reads of the line being written in the
// same cycle, which must return the merged new line.
module tb_dmem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int WD = 512, LINES = 256;
  logic          re = 0, we = 0;
  logic [7:0]    raddr = 0, waddr = 0;
  logic [WD-1:0] rdata, wdata, expv;
  logic [WD/8-1:0] be;
  logic [WD-1:0] shadow [16];

  dmem dut (.clk, .re, .raddr, .rdata, .we, .waddr, .be, .wdata);

  function automatic logic [WD-1:0] rnd();
    logic [WD-1:0] v;
    for (int k = 0; k < WD / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i * 8); be = '1; wdata = rnd(); shadow[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 400; t++) begin
      int wi, ri;
      wi = $urandom % 16;
      ri = (t % 3 == 0) ? wi : $urandom % 16;
      we = ($urandom % 2) == 1; waddr = 8'(wi * 8); wdata = rnd();
      be = {$urandom, $urandom};
      re = 1; raddr = 8'(ri * 8);
      if (we) for (int b = 0; b < WD / 8; b++) if (be[b]) shadow[wi][8*b +: 8] = wdata[8*b +: 8];
      expv = shadow[ri];
      @(negedge clk);
      chk(rdata == expv, $sformatf("read line %0d (same-cycle write %0d)", ri, we && wi == ri));
      re = 0; we = 0;
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
