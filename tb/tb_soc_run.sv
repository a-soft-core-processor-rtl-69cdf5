// tb_soc_run: harness for one configuration of the soft core. It loads the
// generated reduction program for f(x) = x^M + x^A + x^B + x^C + 1 on W-bit
// accelerator words, runs NRUNS random polynomials of degree <= 2M-2 through
// it, compares each stored result with a bit-serial reference and reports
// the cycles from reset release to the final flag store, and how many of
// the program's instructions are shifts, XORs and others. 'finished' rises
// when all runs are over.
module tb_soc_run #(
  parameter int W = 294, M = 283, A = 12, B = 7, C = 5, NRUNS = 3
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import ecc_pkg::*;
  import tb_asm_pkg::*;

  localparam int WD = mem_width(W), LBYTES = WD / 8, LINES = 16384 / LBYTES;
  localparam int IN_BASE = 0, OUT_BASE = 32 * LBYTES, DONE = 60 * LBYTES;

  logic        rst_n = 1'b0, prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;

  ecc_soc #(.W(W), .M(M), .A(A), .B(B), .C(C)) dut (
    .clk, .rst_n, .io_in(32'd0), .io_out(), .io_out_valid(), .prog_we, .prog_addr, .prog_wdata);

  initial begin
    prog_t prog;
    logic [1023:0] g, ref_r, got;
    logic [WD-1:0] line;
    int n2, n, cyc;
    finished = 0; checks = 0; failures = 0; cycles = 0;
    n2 = (2 * M - 1 + W - 1) / W;
    n  = (M + W - 1) / W;
    prog = reduction_program(W, M, A, B, C, LBYTES, IN_BASE, OUT_BASE, DONE);
    for (int run = 0; run < NRUNS; run++) begin
      rst_n = 1'b0;
      @(negedge clk);
      foreach (prog[j]) begin
        prog_we = 1'b1; prog_addr = 12'(j); prog_wdata = prog[j];
        @(negedge clk);
      end
      prog_we = 1'b0;
      for (int l = 0; l < 64; l++) dut.u_dmem.mem[l] = '0;
      g = '0;
      for (int k = 0; k < 32; k++) g[32*k +: 32] = $urandom;
      g &= (1024'd1 << (2 * M - 1)) - 1;
      for (int i = 0; i < n2; i++) begin
        line = '0;
        line[W-1:0] = g[W*i +: W];
        dut.u_dmem.mem[IN_BASE / LBYTES + i] = line;
      end
      ref_r = poly_mod(g, M, A, B, C);
      @(negedge clk) rst_n = 1'b1;
      cyc = 0;
      do begin
        @(negedge clk);
        cyc++;
      end while (!(dut.m_we && dut.d_waddr == DONE) && cyc < 5000);
      repeat (3) @(negedge clk);
      got = '0;
      for (int i = 0; i < n; i++) begin
        line = dut.u_dmem.mem[OUT_BASE / LBYTES + i];
        got[W*i +: W] = line[W-1:0];
      end
      checks += 2;
      if (cyc >= 5000) failures++;
      if (got != ref_r) begin
        failures++;
        $display("FAIL W=%0d M=%0d run %0d", W, M, run);
      end
      cycles = cyc;
    end
    begin
      int n_sh = 0, n_x = 0;
      foreach (prog[j])
        if (prog[j][31:26] == OP_COP2) begin
          if (prog[j][5:0] == EFN_XOR) n_x++;
          else n_sh++;
        end
      $display("W=%0d f=x^%0d+x^%0d+x^%0d+x^%0d+1: %0d shifts, %0d xors, %0d others, %0d cycles to the flag store",
               W, M, A, B, C, n_sh, n_x, prog.size() - n_sh - n_x, cycles);
    end
    finished = 1;
  end
endmodule
