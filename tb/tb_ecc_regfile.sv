// tb_ecc_regfile: writes random W-bit values to all 32 accelerator
// registers and reads them back on both ports against a shadow array;
// checks that register 0 stays zero and that a read of the register being
// written returns the new value.
module tb_ecc_regfile;
  localparam int W = 294;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0]   ra1, ra2, wa;
  logic [W-1:0] rd1, rd2, wd;
  logic         we = 0;
  logic [W-1:0] shadow [32];

  ecc_regfile dut (.clk, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < 10; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    shadow[0] = '0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = rnd();
      ra1 = 5'(r); ra2 = 5'(r); #1;
      chk(rd1 == (r == 0 ? '0 : wd), "write-through port 1");
      chk(rd2 == (r == 0 ? '0 : wd), "write-through port 2");
      shadow[r] = (r == 0) ? '0 : wd;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 200; t++) begin
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      chk(rd1 == shadow[ra1], $sformatf("read1 r%0d", ra1));
      chk(rd2 == shadow[ra2], $sformatf("read2 r%0d", ra2));
      @(negedge clk);
      we = ($urandom % 2) == 1; wa = 5'($urandom); wd = rnd();
      @(negedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      we = 0;
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
