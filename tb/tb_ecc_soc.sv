// tb_ecc_soc: end-to-end test of the soft core with the accelerator at its
// default configuration (W = 294 bits, f(x) = x^283 + x^12 + x^7 + x^5 + 1,
// 512-bit data memory lines).
// A generated program reads IO input with the main core, stores it into a
// line lane and echoes it to the IO output register, loads a polynomial g(x) of degree <= 2m-2 from memory into the
// accelerator, reduces it with XOR and fixed shifts, stores the m-bit result
// and finally writes a flag word. The testbench compares the result with a
// bit-serial reference, checks that the bytes of each line above the
// accelerator word were not disturbed, and checks the cycle count against
// one instruction per cycle plus one stall per load followed directly by a
// use of its result. It counts the pipeline mechanisms it saw and fails on
// any that never happened.
module tb_ecc_soc;
  import ecc_pkg::*;
  import tb_asm_pkg::*;

  localparam int W = 294, M = 283, A = 12, B = 7, C = 5;
  localparam int WD = 512, LBYTES = WD / 8;
  localparam int IN_BASE = 0, OUT_BASE = 32 * LBYTES, IO_OUT_LINE = 40;
  localparam int DONE = 48 * LBYTES + 8;     // lane 2 of line 48
  localparam int NRUNS = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] io_in, io_out;
  logic        io_out_valid;
  logic prog_we = 1'b0;
  logic [11:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_soc dut (.clk, .rst_n, .io_in, .io_out, .io_out_valid, .prog_we, .prog_addr, .prog_wdata);

  // --------------------------------------------------- mechanism counters
  int n_io_out, n_ecc_stall, n_mips_stall, n_fwd_exma, n_fwd_wb, n_eld, n_est, n_io, n_lane_st, n_br;
  int n_sel[8];
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ecc.ecc_hazard) n_ecc_stall++;
    if (dut.u_core.load_use) n_mips_stall++;
    if (dut.u_ecc.idex_q.ctrl.use_rs && dut.u_ecc.exma_q.reg_we &&
        dut.u_ecc.exma_q.dst == dut.u_ecc.idex_q.rs) n_fwd_exma++;
    if (dut.u_ecc.idex_q.ctrl.use_rs && dut.u_ecc.mawb_q.reg_we &&
        dut.u_ecc.mawb_q.dst == dut.u_ecc.idex_q.rs &&
        !(dut.u_ecc.exma_q.reg_we && dut.u_ecc.exma_q.dst == dut.u_ecc.idex_q.rs)) n_fwd_wb++;
    if (dut.u_ecc.idex_q.ctrl.ld) n_eld++;
    if (dut.u_ecc.idex_q.ctrl.st) n_est++;
    if (dut.u_ecc.idex_q.ctrl.op != EOP_XOR && dut.u_ecc.idex_q.ctrl.reg_we)
      n_sel[dut.u_ecc.idex_q.ctrl.sel]++;
    if (dut.d_re && dut.d_raddr[31]) n_io++;
    if (dut.m_we && dut.d_size != SZ_LINE) n_lane_st++;
    if (!dut.id_stall && dut.u_core.br_taken) n_br++;
    if (io_out_valid) n_io_out++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected one-cycle stalls: a load whose result the next instruction uses
  function automatic int count_stalls(prog_t p, int upto);
    int s = 0;
    for (int j = 1; j <= upto; j++) begin
      logic [31:0] pr = p[j-1], cu = p[j];
      if (pr[31:26] == OP_LWC2 && pr[20:16] != 0) begin
        if (cu[31:26] == OP_COP2 && (cu[25:21] == pr[20:16] ||
            (cu[5:0] == EFN_XOR && cu[20:16] == pr[20:16]))) s++;
        else if (cu[31:26] == OP_SWC2 && cu[20:16] == pr[20:16]) s++;
      end
      if (pr[31:26] == OP_LW && pr[20:16] != 0) begin
        if (cu[31:26] inside {OP_SW, OP_SB, OP_SH} &&
            (cu[25:21] == pr[20:16] || cu[20:16] == pr[20:16])) s++;
        else if (cu[31:26] == OP_SPECIAL && (cu[25:21] == pr[20:16] || cu[20:16] == pr[20:16])) s++;
      end
    end
    return s;
  endfunction

  prog_t prog;
  int    done_idx;

  initial begin
    prog_t red;
    logic [1023:0] g, ref_r, got;
    logic [WD-1:0] line;
    int n2, n, cyc, exp_cyc;
    n2 = (2 * M - 1 + W - 1) / W;
    n  = (M + W - 1) / W;

    // prologue: IO read by the main core, stored into a lane (load-use
    // stall), then echoed to the IO output with its low byte changed by SB
    prog.push_back(i_type(OP_LUI, 5'd0, 5'd6, 16'h8000));
    prog.push_back(i_type(OP_LW, 5'd6, 5'd4, 16'd0));
    prog.push_back(i_type(OP_SW, 5'd0, 5'd4, 16'(IO_OUT_LINE * LBYTES + 4)));
    prog.push_back(i_type(OP_SW, 5'd6, 5'd4, 16'd4));
    prog.push_back(i_type(OP_SB, 5'd6, 5'd6, 16'd4));
    red = reduction_program(W, M, A, B, C, LBYTES, IN_BASE, OUT_BASE, DONE);
    foreach (red[j]) prog.push_back(red[j]);
    done_idx = prog.size() - 3;
    $display("program: %0d instructions, %0d before the flag store", prog.size(), done_idx);

    for (int run = 0; run < NRUNS; run++) begin
      int io_out_before;
      rst_n = 1'b0;
      io_in = $urandom;
      @(negedge clk);
      foreach (prog[j]) begin
        prog_we = 1'b1; prog_addr = 12'(j); prog_wdata = prog[j];
        @(negedge clk);
      end
      prog_we = 1'b0;
      // random line contents everywhere, then the input polynomial
      for (int l = 0; l < 256; l++) begin
        for (int k = 0; k < WD / 32; k++) line[32*k +: 32] = $urandom;
        dut.u_dmem.mem[l] = line;
      end
      g = '0;
      for (int k = 0; k < 32; k++) g[32*k +: 32] = $urandom;
      if (run == 0) g = '1;
      g &= (1024'd1 << (2 * M - 1)) - 1;
      for (int i = 0; i < n2; i++) begin
        line = dut.u_dmem.mem[IN_BASE / LBYTES + i];
        line[W-1:0] = g[W*i +: W];
        dut.u_dmem.mem[IN_BASE / LBYTES + i] = line;
      end
      ref_r = poly_mod(g, M, A, B, C);

      check(io_out == '0 && !io_out_valid, "IO output cleared by reset");
      io_out_before = n_io_out;
      @(negedge clk) rst_n = 1'b1;
      cyc = 0;
      do begin
        @(negedge clk);
        cyc++;
      end while (!(dut.m_we && dut.d_waddr == DONE) && cyc < 5000);
      check(cyc < 5000, "flag store seen");
      exp_cyc = done_idx + 3 + count_stalls(prog, done_idx);
      check(cyc == exp_cyc, $sformatf("cycles %0d expected %0d", cyc, exp_cyc));
      $display("run %0d: flag store after %0d cycles", run, cyc);
      repeat (3) @(negedge clk);

      got = '0;
      for (int i = 0; i < n; i++) begin
        line = dut.u_dmem.mem[OUT_BASE / LBYTES + i];
        got[W*i +: W] = line[W-1:0];
        check(line[((W + 7) / 8) * 8 - 1 : W] == '0, "pad bits above W cleared by EST");
      end
      check(got == ref_r, $sformatf("run %0d reduction result", run));
      if (got != ref_r) $display("  got %h\n  exp %h", got[M-1:0], ref_r[M-1:0]);
      line = dut.u_dmem.mem[IO_OUT_LINE];
      check(line[63:32] == io_in, "IO input stored by the main core");
      check(io_out == {io_in[31:8], 8'h00}, $sformatf("IO output %h", io_out));
      check(n_io_out - io_out_before == 2, "two IO output strobes");
    end

    check(n_ecc_stall > 0, "accelerator load-use stall happened");
    check(n_mips_stall > 0, "main-core load-use stall happened");
    check(n_fwd_exma > 0, "accelerator Ex/Ma bypass used");
    check(n_fwd_wb > 0, "accelerator Wb bypass used");
    check(n_eld > 0 && n_est > 0, "accelerator loads and stores");
    check(n_io > 0, "IO input read");
    check(n_lane_st > 0, "main-core lane store");
    check(n_io_out > 0, "IO output written");
    check(n_br > 0, "branch taken");
    for (int s = 0; s < 8; s++)
      if (s != 3 && s != 7) check(n_sel[s] > 0, $sformatf("shift selector %0d used", s));
    $display("stalls ecc=%0d mips=%0d bypass exma=%0d wb=%0d eld=%0d est=%0d io=%0d br=%0d",
             n_ecc_stall, n_mips_stall, n_fwd_exma, n_fwd_wb, n_eld, n_est, n_io, n_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
