// tb_speedup: the comparison the accelerator exists for. On the default
// build (W = 294, f(x) = x^283 + x^12 + x^7 + x^5 + 1) the same random
// polynomials are reduced twice: once by the accelerator, and once in
// software by the 32-bit main core alone, with the same word-level
// algorithm on 32-bit words (LW/SW, XOR, SLL/SRL by the 32-bit amounts
// 15/20/22/27 and 17/12/10/5). Both results are checked against a
// bit-serial reference; the cycle counts and their ratio are printed, and
// the accelerator must be at least four times faster in cycles.
module tb_speedup;
  import ecc_pkg::*;
  import tb_asm_pkg::*;

  localparam int W = 294, M = 283, A = 12, B = 7, C = 5;
  localparam int WD = 512, LBYTES = WD / 8;
  localparam int HW_IN = 0, HW_OUT = 4 * LBYTES, SW_IN = 8 * LBYTES, SW_OUT = 12 * LBYTES;
  localparam int DONE = 16 * LBYTES;
  localparam int NRUNS = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_soc dut (.clk, .rst_n, .io_in(32'd0), .io_out(), .io_out_valid(), .prog_we, .prog_addr, .prog_wdata);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // run one program to its flag store; returns the cycle count
  task automatic run_prog(prog_t p, output int cyc);
    rst_n = 1'b0;
    @(negedge clk);
    foreach (p[j]) begin
      prog_we = 1'b1; prog_addr = 12'(j); prog_wdata = p[j];
      @(negedge clk);
    end
    prog_we = 1'b0;
    dut.u_dmem.mem[DONE / LBYTES] = '0;
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!(dut.m_we && dut.d_waddr == DONE) && cyc < 20000);
    repeat (3) @(negedge clk);
    chk(cyc < 20000, "program finished");
  endtask

  function automatic logic [31:0] rd_word(int addr);
    logic [WD-1:0] line = dut.u_dmem.mem[addr / LBYTES];
    return line[32 * ((addr % LBYTES) / 4) +: 32];
  endfunction

  task automatic wr_word(int addr, logic [31:0] v);
    logic [WD-1:0] line = dut.u_dmem.mem[addr / LBYTES];
    line[32 * ((addr % LBYTES) / 4) +: 32] = v;
    dut.u_dmem.mem[addr / LBYTES] = line;
  endtask

  initial begin
    prog_t hw, sw;
    logic [1023:0] g, ref_r, got;
    logic [WD-1:0] line;
    int c_hw, c_sw;
    hw = reduction_program(W, M, A, B, C, LBYTES, HW_IN, HW_OUT, DONE);
    sw = reduction_program(32, M, A, B, C, 4, SW_IN, SW_OUT, DONE, 1'b1);
    for (int run = 0; run < NRUNS; run++) begin
      g = '0;
      for (int k = 0; k < 32; k++) g[32*k +: 32] = $urandom;
      g &= (1024'd1 << (2 * M - 1)) - 1;
      ref_r = poly_mod(g, M, A, B, C);
      for (int l = 0; l < 16; l++) dut.u_dmem.mem[l] = '0;
      for (int i = 0; i < 2; i++) begin
        line = '0;
        line[W-1:0] = g[W*i +: W];
        dut.u_dmem.mem[HW_IN / LBYTES + i] = line;
      end
      for (int i = 0; i < 18; i++) wr_word(SW_IN + 4 * i, g[32*i +: 32]);

      run_prog(hw, c_hw);
      line = dut.u_dmem.mem[HW_OUT / LBYTES];
      got = '0;
      got[W-1:0] = line[W-1:0];
      chk(got == ref_r, "accelerated reduction");

      run_prog(sw, c_sw);
      got = '0;
      for (int i = 0; i < 9; i++) got[32*i +: 32] = rd_word(SW_OUT + 4 * i);
      chk(got == ref_r, "software reduction on the main core");

      chk(c_sw >= 4 * c_hw, $sformatf("speed-up %0d/%0d", c_sw, c_hw));
      $display("run %0d: accelerator %0d cycles, main core alone %0d cycles, speed-up %0.2f",
               run, c_hw, c_sw, real'(c_sw) / real'(c_hw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
